// tb_dp_ram: writes random words to random addresses of the 1024 x 18
// memory while reading others, then checks every read (one cycle latency)
// against a model array, including a read of the address being written.
module tb_dp_ram;
  localparam int W = 18, D = 1024;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  bit valid [D];
  int checks = 0, failures = 0;

  always #8 clk = ~clk;

  dp_ram #(.W(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [9:0] ra;
    logic [W-1:0] exp;
    bit ev;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = 10'($urandom);
      wdata = W'($urandom);
      raddr = 10'($urandom);
      ra = raddr;
      exp = model[ra];             // read sees the old contents
      ev = valid[ra];
      @(posedge clk);
      model[waddr] = wdata;
      valid[waddr] = 1'b1;
      #1;
      if (ev) check(rdata == exp, $sformatf("addr %0d: %h vs %h", ra, rdata, exp));
    end
    we = 1'b0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk) raddr = 10'(a);
      @(posedge clk) #1;
      if (valid[a]) check(rdata == model[a], $sformatf("final addr %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
