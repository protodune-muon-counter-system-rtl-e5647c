// tb_sync_fifo: random writes and reads on a 96-bit, 64-deep FIFO compared
// with a queue model: data order, empty/full flags and count, writes to a
// full FIFO ignored.
module tb_sync_fifo;
  localparam int W = 96, D = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [6:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0;

  always #8 clk = ~clk;

  sync_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .din, .rd_en, .dout, .empty, .full, .count);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int wp;
      wp = (i < 1000) ? 70 : (i < 2000 ? 30 : 50);
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() != 0) check(dout == q[0], "data order");
      if (full) n_full++;
      wr_en = ($urandom_range(99) < wp);
      rd_en = ($urandom_range(99) < 100 - wp);
      din = {$urandom, $urandom, $urandom};
      @(posedge clk);
      begin
        bit was_full;
        was_full = (q.size() == D);
        if (rd_en && q.size() != 0) void'(q.pop_front());
        if (wr_en && !was_full) q.push_back(din);
      end
    end
    check(n_full > 0, "full reached");
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
