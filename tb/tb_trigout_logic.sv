// tb_trigout_logic: random hit patterns (sparse and dense) in all three
// trigger-out modes, compared one cycle later with an independent model:
// OR of all bits, hit in both halves, population count >= threshold.
module tb_trigout_logic;
  import mc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [63:0] hits = '0;
  trigout_mode_e mode = TO_OR;
  logic [6:0] thr = 7'd2;
  logic trig_out;
  int checks = 0, failures = 0;

  always #8 clk = ~clk;

  trigout_logic #(.N(64)) dut (.clk, .rst_n, .hits, .mode, .mult_thr(thr), .trig_out);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit model(logic [63:0] h, trigout_mode_e m, int t);
    int n;
    n = $countones(h);
    case (m)
      TO_COINC: return (h[31:0] != 0) && (h[63:32] != 0);
      TO_MULT:  return n >= t && n > 0;
      default:  return h != 0;
    endcase
  endfunction

  initial begin
    int n_true;
    n_true = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      logic [63:0] h;
      bit e;
      h = '0;
      for (int k = 0; k < int'($urandom_range(5)); k++) h[$urandom_range(63)] = 1'b1;
      mode = trigout_mode_e'(i % 3);
      thr  = 7'($urandom_range(1, 4));
      hits = h;
      e = model(h, mode, int'(thr));
      @(negedge clk);
      check(trig_out == e, $sformatf("mode %0d thr %0d hits %h: %0b", mode, thr, h, trig_out));
      if (e) n_true++;
    end
    check(n_true > 100, "enough true cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
