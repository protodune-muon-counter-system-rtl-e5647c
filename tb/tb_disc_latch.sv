// tb_disc_latch: checks the edge-set discriminator flip-flops. Short
// comparator pulses (3 ns, shorter than a clock period) at random times on
// random channels must appear on hits within 3 clock cycles and stay; clr
// clears all bits; an edge that arrives while clr is high is lost; a
// comparator still high after clr does not set its bit again.
module tb_disc_latch;
  localparam int N = 64;
  logic clk = 1'b0, clr = 1'b0;
  logic [N-1:0] comp = '0, hits;
  int checks = 0, failures = 0;

  always #8 clk = ~clk;

  disc_latch #(.N_CH(N)) dut (.clk, .comp, .clr, .hits);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic short_pulse(int ch);
    comp[ch] = 1'b1;
    #3;
    comp[ch] = 1'b0;
  endtask

  initial begin
    logic [N-1:0] exp;
    #5 clr = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) clr = 1'b0;
    repeat (2) @(posedge clk);
    check(hits == '0, "clear after reset");
    for (int r = 0; r < 20; r++) begin
      exp = '0;
      for (int k = 0; k < 4; k++) begin
        int ch;
        ch = $urandom_range(N - 1);
        repeat (1 + $urandom_range(15)) #1;
        short_pulse(ch);
        exp[ch] = 1'b1;
      end
      repeat (3) @(posedge clk);
      #1;
      check(hits == exp, $sformatf("round %0d pattern %h vs %h", r, hits, exp));
      // clr for 5 cycles; an edge inside it is lost.
      @(negedge clk) clr = 1'b1;
      #2 short_pulse(r % N);
      comp[(r + 7) % N] = 1'b1;            // stays high across clr
      repeat (5) @(negedge clk);
      clr = 1'b0;
      repeat (4) @(posedge clk);
      #1;
      check(hits == '0, $sformatf("round %0d cleared", r));
      comp[(r + 7) % N] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
