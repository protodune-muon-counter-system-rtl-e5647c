// tb_trigger_logic: checks trigger formation. The testbench models the
// discriminator flip-flops (bits set by injected hits, cleared while
// disc_clr is high) and a free-running time-stamp. For random first-hit
// times and random later hits it checks: the time-stamp is that of the first
// hit; hits up to 3 cycles after it (4-cycle trigger time) are in the
// pattern, later ones are not; ev_valid comes 3 cycles after trig_start;
// disc_clr is high for 5 cycles (80 ns); the FIFO write and overflow
// strobes follow fifo_full; the gate and inhibit refuse triggers.
module tb_trigger_logic;
  import mc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] hl, inj;
  logic [TS_W-1:0] ts;
  logic gate_mode = 1'b0, gate = 1'b0, inhibit = 1'b0, fifo_full = 1'b0;
  logic trig_start, ev_valid, fifo_we, fifo_ovf, vetoed, disc_clr;
  trig_word_t ev;
  int checks = 0, failures = 0;
  int cyc = 0, t_start, t_ev, n_ev, n_veto, n_we, n_ovf, clr_len, clr_run;
  trig_word_t last_ev;

  always #8 clk = ~clk;

  trigger_logic dut (.clk, .rst_n, .hits(hl), .ts, .gate_mode, .gate, .inhibit,
    .fifo_full, .trig_start, .ev_valid, .ev, .fifo_we, .fifo_ovf, .vetoed, .disc_clr);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    ts  <= rst_n ? ts + 1 : 32'd1000;
    hl  <= disc_clr ? '0 : (hl | inj);
    if (trig_start) t_start = cyc;
    if (ev_valid) begin t_ev = cyc; n_ev++; last_ev = ev; end
    if (vetoed) n_veto++;
    if (fifo_we) n_we++;
    if (fifo_ovf) n_ovf++;
    if (disc_clr) clr_run++;
    else if (clr_run != 0) begin clr_len = clr_run; clr_run = 0; end
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Inject the pattern for one clock; returns the time-stamp the DUT sees
  // together with it.
  task automatic inject(logic [N_CH-1:0] p);
    @(negedge clk) inj = p;
    @(negedge clk) inj = '0;
  endtask

  initial begin
    inj = '0; hl = '0; ts = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int r = 0; r < 40; r++) begin
      logic [N_CH-1:0] first, exp;
      logic [TS_W-1:0] ts0;
      int n0;
      first = '0; first[$urandom_range(63)] = 1'b1;
      exp = first;
      n0 = n_ev;
      repeat ($urandom_range(5)) @(negedge clk);
      inj = first;
      @(posedge clk); #1 ts0 = ts;          // hl shows the hit from now on
      @(negedge clk) inj = '0;
      for (int k = 1; k <= 6; k++) begin
        logic [N_CH-1:0] p;
        p = '0; p[$urandom_range(63)] = 1'b1;
        if ($urandom_range(1) == 1) begin
          inj = p;
          if (k <= 3) exp |= p;
        end
        @(negedge clk) inj = '0;
      end
      repeat (10) @(negedge clk);
      check(n_ev == n0 + 1, $sformatf("round %0d: one event", r));
      check(last_ev.ts == ts0, $sformatf("round %0d: ts %0d vs %0d", r, last_ev.ts, ts0));
      check(last_ev.hits == exp, $sformatf("round %0d: hits %h vs %h", r, last_ev.hits, exp));
      check(t_ev - t_start == 3, $sformatf("round %0d: window %0d cycles", r, t_ev - t_start + 1));
      check(clr_len == 5, $sformatf("round %0d: dead-time %0d cycles", r, clr_len));
    end
    // FIFO full: overflow strobe, no write.
    n_we = 0; n_ovf = 0;
    fifo_full = 1'b1;
    inject(64'h1);
    repeat (12) @(negedge clk);
    check(n_ovf == 1 && n_we == 0, "full FIFO: overflow, no write");
    fifo_full = 1'b0;
    inject(64'h2);
    repeat (12) @(negedge clk);
    check(n_ovf == 1 && n_we == 1, "FIFO write");
    // Gated mode: refused while gate low, accepted while high.
    gate_mode = 1'b1; n_veto = 0; n_ev = 0;
    inject(64'h4);
    repeat (12) @(negedge clk);
    check(n_veto == 1 && n_ev == 0, "gate low refuses trigger");
    gate = 1'b1;
    inject(64'h8);
    repeat (12) @(negedge clk);
    check(n_ev == 1, "gate high accepts trigger");
    gate_mode = 1'b0; inhibit = 1'b1;
    inject(64'h10);
    repeat (12) @(negedge clk);
    check(n_veto == 2 && n_ev == 1, "inhibit refuses trigger");
    inhibit = 1'b0;
    inject(64'h20);
    repeat (12) @(negedge clk);
    check(n_ev == 2 && last_ev.hits == 64'h20, "trigger after inhibit");
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
