// tb_pmt_board: one PMT board at its default sizes, read out by the USB
// link master as in a one-board chain, with the Maroc2 multiplexer and ADC
// modelled. Checks, through the packets that reach the PC side:
//  - register write and read-back over the link;
//  - a trigger on channels 5 and 17 gives a trigger packet with that hit
//    pattern and an ADC packet with the same time-stamp and exactly the two
//    hit channels and their ADC values (suppression on);
//  - with suppression off all 64 channels come out;
//  - the ADC readout takes 64 conversions 33 cycles apart (33.8 us), all
//    under hold;
//  - a sync clears the time-stamp: the next trigger's time-stamp is the
//    number of cycles from sync to hit (within the synchroniser latency);
//  - in gated mode a hit outside the gate gives nothing, inside it a packet;
//  - latch-only mode (ADC off) gives trigger packets only;
//  - in conditional mode an event gets ADC data only when the trigger box
//    (modelled as the board's own trigger-out, two cycles late) answers;
//  - the set-up bytes written over the link come out of the G port;
//  - the trigger-out pulses.
module tb_pmt_board;
  import mc_pkg::*;
  localparam logic [6:0] ADDR = 7'd1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [63:0] comp = '0;
  logic hold, r_clk, r_d, adc_conv, g_clk, g_d, g_load, trig_out;
  logic [11:0] adc_data;
  logic sync_gate = 1'b0, inhibit = 1'b0;
  logic box_answer = 1'b0, box_trig = 1'b0, tout_q = 1'b0;
  int n_discard = 0;
  link_word_t ring_a, ring_b;
  logic wclk_a, wclk_b;
  logic [PW-1:0] host_cmd = '0;
  logic host_cmd_valid = 1'b0, host_cmd_ready;
  link_word_t host_rx;
  logic host_rx_valid;
  logic [31:0] tokens;
  logic ev_trigger, ev_sync, ev_gate, ev_veto, ev_fifo_ovf, ev_adc_drop, ev_adc_done, ev_tok_passed, ev_tok_held;
  logic ev_adc_discard, ev_link_ovf;
  int checks = 0, failures = 0, cyc = 0;
  link_word_t rxq [$];
  int n_trig_out = 0, t_conv_prev = -1, conv_gap_bad = 0, n_conv = 0;
  logic gclk_q = 1'b0;
  logic [7:0] gbytes [N_MAROC];
  int gbits = 0;

  always #8 clk = ~clk;

  pmt_board dut (
    .clk, .rst_n, .my_addr(ADDR), .comp, .hold, .r_clk, .r_d, .adc_conv, .adc_data,
    .g_clk, .g_d, .g_load, .sync_gate, .inhibit, .trig_out, .box_trig,
    .rx_word(ring_a), .rx_wclk(wclk_a), .tx_word(ring_b), .tx_wclk(wclk_b),
    .ev_trigger, .ev_sync, .ev_gate, .ev_veto, .ev_fifo_ovf, .ev_adc_drop, .ev_adc_discard,
    .ev_adc_done, .ev_tok_passed, .ev_tok_held, .ev_link_ovf);

  usb_link_master u_usb (
    .clk, .rst_n, .host_cmd, .host_cmd_valid, .host_cmd_ready, .host_rx, .host_rx_valid,
    .host_rx_ready(1'b1), .tx_word(ring_a), .tx_wclk(wclk_a), .rx_word(ring_b), .rx_wclk(wclk_b),
    .tokens, .rx_ovf());

  maroc_adc_model #(.BOARD(1)) u_maroc (.clk, .hold, .r_clk, .r_d, .adc_conv, .adc_data);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (host_rx_valid) rxq.push_back(host_rx);
      if (trig_out) n_trig_out++;
      if (ev_adc_discard) n_discard++;
      tout_q   <= trig_out;
      box_trig <= box_answer && tout_q;
      if (adc_conv) begin
        if (t_conv_prev >= 0 && n_conv % 64 != 0 && cyc - t_conv_prev != 33) conv_gap_bad++;
        t_conv_prev = cyc;
        n_conv++;
      end
      gclk_q <= g_clk;
      if (g_clk && !gclk_q && gbits < 8 * int'(N_MAROC)) begin
        gbytes[gbits / 8][7 - gbits % 8] = g_d;
        gbits++;
      end
    end
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic ctrl(logic [6:0] r, logic [7:0] d);
    @(negedge clk) host_cmd = {ADDR, r, d}; host_cmd_valid = 1'b1;
    @(posedge clk);
    while (!host_cmd_ready) @(posedge clk);
    @(negedge clk) host_cmd_valid = 1'b0;
  endtask

  task automatic hit(logic [63:0] chans);
    @(negedge clk);
    #3 comp = chans;
    #4 comp = '0;
  endtask

  // Wait for n words at the PC side (or time out).
  task automatic wait_words(int n, int max_cyc);
    int t;
    t = 0;
    while (rxq.size() < n && t < max_cyc) begin @(negedge clk); t++; end
  endtask

  // Pop and check one trigger packet; return its time-stamp and hits.
  task automatic get_trig(output logic [31:0] ts, output logic [63:0] h);
    link_word_t w [7];
    wait_words(7, 2000);
    check(rxq.size() >= 7, "trigger packet arrived");
    ts = '0; h = '0;
    if (rxq.size() < 7) return;
    for (int i = 0; i < 7; i++) w[i] = rxq.pop_front();
    check(w[0] == mk_word(W_DATA, mk_hdr(SUB_TRIG_HDR, ADDR, 13'd6)), $sformatf("trigger header %h", w[0]));
    ts = {w[1].payload[15:0], w[2].payload[15:0]};
    h  = {w[3].payload[15:0], w[4].payload[15:0], w[5].payload[15:0], w[6].payload[15:0]};
  endtask

  task automatic get_adc(input logic [31:0] ts_exp, input logic [63:0] chans);
    link_word_t w;
    int n, k;
    n = $countones(chans) + 2;
    wait_words(n + 1, 5000);
    check(rxq.size() >= n + 1, "ADC packet arrived");
    if (rxq.size() < n + 1) return;
    w = rxq.pop_front();
    check(w == mk_word(W_DATA, mk_hdr(SUB_ADC_HDR, ADDR, 13'(n))), $sformatf("ADC header %h", w));
    w = rxq.pop_front(); check(w.payload[15:0] == ts_exp[31:16], "ADC ts high");
    w = rxq.pop_front(); check(w.payload[15:0] == ts_exp[15:0], "ADC ts low");
    k = 0;
    for (int c = 0; c < 64; c++) if (chans[c]) begin
      w = rxq.pop_front();
      check(w.payload[17:0] == {6'(c), u_maroc.value(c)}, $sformatf("ADC word ch %0d: %h", c, w.payload));
    end
  endtask

  initial begin
    logic [31:0] ts;
    logic [63:0] h;
    int t0, r0, u0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (50) @(negedge clk);
    // Register write and read-back.
    ctrl(R_HOLD_DLY, 8'd3);
    ctrl(R_READ_REQ, 8'(R_HOLD_DLY));
    wait_words(1, 1000);
    check(rxq.size() == 1 && rxq[0] == mk_word(W_CTRL, {ADDR, R_READ_REPLY, 8'd3}), "register read-back");
    rxq.delete();
    // Trigger with ADC readout, suppression on.
    n_conv = 0;
    r0 = u_maroc.n_rclk; u0 = u_maroc.n_conv_unheld;
    hit(64'h0000_0000_0002_0020);
    get_trig(ts, h);
    check(h == 64'h0000_0000_0002_0020, $sformatf("hit pattern %h", h));
    get_adc(ts, 64'h0000_0000_0002_0020);
    check(n_conv == 64 && conv_gap_bad == 0, $sformatf("%0d conversions, %0d bad gaps", n_conv, conv_gap_bad));
    check(u_maroc.n_conv_unheld == u0 && u_maroc.n_rclk - r0 == 64,
          $sformatf("conversions under hold, %0d R-clocks", u_maroc.n_rclk - r0));
    check(n_trig_out > 0, "trigger-out pulsed");
    // Sync, then a hit 500 cycles later.
    @(negedge clk) sync_gate = 1'b1;
    @(negedge clk) sync_gate = 1'b0;
    t0 = cyc;
    repeat (500) @(negedge clk);
    hit(64'h8000_0000_0000_0000);
    get_trig(ts, h);
    check(ts >= 32'd496 && ts <= 32'd506, $sformatf("time-stamp after sync %0d", ts));
    get_adc(ts, 64'h8000_0000_0000_0000);
    // Suppression off: all channels.
    ctrl(R_MODE, 8'h01);
    hit(64'h1);
    get_trig(ts, h);
    get_adc(ts, '1);
    // Conditional readout: no trigger-box answer, no ADC packet.
    ctrl(R_MODE, 8'h43);
    hit(64'h0400_0000_0000_0000);
    get_trig(ts, h);
    repeat (2600) @(negedge clk);
    check(rxq.size() == 0 && n_discard == 1, $sformatf("no answer: ADC data discarded (%0d)", n_discard));
    // With the answer, the ADC packet comes.
    box_answer = 1'b1;
    hit(64'h0000_0400_0000_0000);
    get_trig(ts, h);
    get_adc(ts, 64'h0000_0400_0000_0000);
    check(n_discard == 1, "answered: ADC data kept");
    box_answer = 1'b0;
    // Gated mode, latch-only (ADC off).
    ctrl(R_MODE, 8'h04);
    repeat (20) @(negedge clk);
    hit(64'h10);
    repeat (1500) @(negedge clk);
    check(rxq.size() == 0, "no packet outside the gate");
    @(negedge clk) sync_gate = 1'b1;     // a long pulse is a gate
    repeat (10) @(negedge clk);
    hit(64'h100);
    repeat (10) @(negedge clk);
    sync_gate = 1'b0;
    get_trig(ts, h);
    check(h == 64'h100, "packet inside the gate");
    repeat (3000) @(negedge clk);
    check(rxq.size() == 0, "latch-only: no ADC packet");
    // G-port load of the set-up bytes.
    for (int i = 0; i < int'(N_MAROC); i++) ctrl(7'(i), 8'(i * 7 + 1));
    gbits = 0;
    ctrl(R_GLOAD, 8'd0);
    repeat (8 * 8 * int'(N_MAROC) + 100) @(negedge clk);
    check(gbits == 8 * int'(N_MAROC), $sformatf("%0d G-port bits", gbits));
    for (int i = 0; i < int'(N_MAROC); i++) check(gbytes[i] == 8'(i * 7 + 1), $sformatf("G-port byte %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
