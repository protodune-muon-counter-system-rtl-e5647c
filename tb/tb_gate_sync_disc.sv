// tb_gate_sync_disc: checks the width classification of the NIM sync/gate
// input. Pulses of 1..6 clock cycles (synchronous to the clock, as the timing
// system sends them) are applied; a 1-cycle pulse must give exactly one sync
// strobe and no gate, a 2-cycle pulse nothing, and a pulse of W >= 3 cycles
// no sync and a gate that is high for W-2 cycles.
module tb_gate_sync_disc;
  logic clk = 1'b0, rst_n = 1'b0, sg = 1'b0;
  logic sync_pulse, gate;
  int checks = 0, failures = 0;
  int n_sync, n_gate;

  always #8 clk = ~clk;

  gate_sync_disc dut (.clk, .rst_n, .sync_gate(sg), .sync_pulse, .gate);

  always @(posedge clk) begin
    if (sync_pulse) n_sync++;
    if (gate)       n_gate++;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(int w);
    n_sync = 0; n_gate = 0;
    @(negedge clk) sg = 1'b1;
    repeat (w) @(negedge clk);
    sg = 1'b0;
    repeat (8) @(negedge clk);
    check(n_sync == (w == 1 ? 1 : 0), $sformatf("width %0d: %0d sync strobes", w, n_sync));
    check(n_gate == (w >= 3 ? w - 2 : 0), $sformatf("width %0d: gate high %0d cycles", w, n_gate));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int w = 1; w <= 6; w++) pulse(w);
    pulse(1);
    pulse(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
