// tb_timestamp_counter: checks that the time-stamp counts one per clock, is
// cleared by sync, and that the sync-period check flags a sync that comes at
// the wrong count only when enabled. SYNC_PERIOD is shortened to 100.
module tb_timestamp_counter;
  localparam int P = 100;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, chk_en = 1'b0;
  logic [31:0] ts;
  logic sync_err;
  int checks = 0, failures = 0, n_err = 0;

  always #8 clk = ~clk;

  timestamp_counter #(.W(32), .SYNC_PERIOD(P)) dut (
    .clk, .rst_n, .sync_pulse(sync), .chk_en, .ts, .sync_err);

  always @(posedge clk) if (sync_err) n_err++;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic do_sync;
    @(negedge clk) sync = 1'b1;
    @(negedge clk) sync = 1'b0;
  endtask

  initial begin
    logic [31:0] t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) t0 = ts;
    repeat (37) @(negedge clk);
    check(ts == t0 + 37, "counts one per clock");
    do_sync();
    check(ts == 32'd0, "cleared by sync");
    repeat (10) @(negedge clk);
    check(ts == 32'd10, "counts after sync");
    // Period check enabled: a correct period gives no error.
    chk_en = 1'b1;
    do_sync();                      // align
    repeat (P - 2) @(negedge clk);
    n_err = 0;
    do_sync();                      // exactly P cycles later
    repeat (3) @(negedge clk);
    check(n_err == 0, "correct period gives no error");
    repeat (P - 10) @(negedge clk);
    do_sync();                      // 8 cycles early
    repeat (3) @(negedge clk);
    check(n_err == 1, "early sync gives an error");
    chk_en = 1'b0;
    repeat (20) @(negedge clk);
    do_sync();
    repeat (3) @(negedge clk);
    check(n_err == 1, "no error while check disabled");
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
