// tb_muon_counter_top: end-to-end test of one readout chain at its default
// sizes (4 boards, 64 channels, 32-bit time-stamps, 33-cycle ADC channel
// period, 10 s sync period). Each board has a Maroc2/ADC model. The PC side
// configures boards, reads registers back and collects every packet; a
// parser checks each packet (trigger packets: header and hit pattern of the
// hits injected; ADC packets: time-stamp of a trigger of the same board,
// channel numbers and ADC values from the model). The test makes each
// mechanism of the design happen and counts it; a mechanism that never
// happened counts as a failure:
//   trigger, dead-time loss, hit-FIFO overflow, ADC readout, ADC busy drop,
//   zero suppression, full readout, token passed empty, token held, trigger
//   and ADC data in one token visit, control write, read-back, sync, sync
//   error, gate, trigger refused (gate/inhibit), G-port load, trigger-out
//   OR / coincidence / multiplicity, trigger-box fan-in and coincidence,
//   trigger-box mode switched by a command from the PC, ADC data discarded
//   and kept in conditional (trigger-box) readout.
// At the end the number of trigger and ADC packets of each board must equal
// the triggers written and the ADC readouts finished.
module tb_muon_counter_top;
  import mc_pkg::*;
  localparam int NB = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sync_gate = 1'b0, inhibit = 1'b0, tbox_mode;
  logic [63:0] comp [NB];
  logic [11:0] adc_data [NB];
  logic [NB-1:0] hold, r_clk, r_d, adc_conv, g_clk, g_d, g_load, trig_out;
  logic [PW-1:0] host_cmd = '0;
  logic host_cmd_valid = 1'b0, host_cmd_ready;
  link_word_t host_rx;
  logic host_rx_valid;
  logic [31:0] tokens;
  logic trig_x, trig_y;
  logic [NB-1:0] ev_trigger, ev_sync, ev_gate, ev_veto, ev_fifo_ovf, ev_adc_drop, ev_adc_done,
                 ev_tok_passed, ev_tok_held, ev_adc_discard, ev_link_ovf;
  logic host_ovf;
  int n_link_ovf = 0;
  int checks = 0, failures = 0;

  always #8 clk = ~clk;

  muon_counter_top dut (
    .clk, .rst_n, .sync_gate, .inhibit, .tbox_mode, .comp, .adc_data, .hold, .r_clk, .r_d,
    .adc_conv, .g_clk, .g_d, .g_load, .trig_out, .host_cmd, .host_cmd_valid, .host_cmd_ready,
    .host_rx, .host_rx_valid, .host_rx_ready(1'b1), .tokens, .host_ovf, .trig_x, .trig_y,
    .ev_trigger, .ev_sync, .ev_gate, .ev_veto, .ev_fifo_ovf, .ev_adc_drop, .ev_adc_discard,
    .ev_adc_done, .ev_tok_passed, .ev_tok_held, .ev_link_ovf);

  for (genvar b = 0; b < NB; b++) begin : g_model
    maroc_adc_model #(.BOARD(b)) u_m (.clk, .hold(hold[b]), .r_clk(r_clk[b]), .r_d(r_d[b]),
      .adc_conv(adc_conv[b]), .adc_data(adc_data[b]));
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- monitors
  int n_trig [NB], n_ovf [NB], n_drop [NB], n_done [NB], n_veto [NB], n_disc [NB];
  int n_pass = 0, n_held = 0, n_sync = 0, n_gate = 0, n_gload = 0;
  int n_tx = 0, n_ty = 0, n_to [NB];
  logic [NB-1:0] gload_q = '0;

  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      if (ev_trigger[b])  n_trig[b]++;
      if (ev_fifo_ovf[b]) n_ovf[b]++;
      if (ev_adc_drop[b]) n_drop[b]++;
      if (ev_adc_done[b]) n_done[b]++;
      if (ev_veto[b])     n_veto[b]++;
      if (ev_adc_discard[b]) n_disc[b]++;
      if (trig_out[b])    n_to[b]++;
    end
    if (|ev_tok_passed) n_pass++;
    if (|ev_tok_held)   n_held++;
    if (host_ovf || (|ev_link_ovf)) n_link_ovf++;
    if (ev_sync[0])     n_sync++;
    if (ev_gate[0])     n_gate++;
    gload_q <= g_load;
    if (g_load[1] && !gload_q[1]) n_gload++;
    if (trig_x) n_tx++;
    if (trig_y) n_ty++;
  end

  // ------------------------------------------------------------ packet parser
  int n_echo = 0;
  int pk_trig [NB], pk_adc [NB], n_supp = 0, n_full = 0, n_both = 0, n_reply = 0;
  logic [7:0] last_reply;
  logic [31:0] trig_ts [NB][$];
  logic [63:0] last_hits [NB];
  int p_left = 0, p_kind = 0, p_board = 0, p_idx = 0, p_len = 0, last_trig_board = -1;
  logic [31:0] p_ts;
  logic [63:0] p_hits;

  always @(posedge clk) if (rst_n && host_rx_valid) begin
    link_word_t w;
    w = host_rx;
    if (w.wtype == W_CTRL && w.payload[21:15] == 7'd0) begin
      n_echo++;                                  // trigger-box command back round the ring
    end else if (w.wtype == W_CTRL) begin
      n_reply++;
      last_reply = w.payload[7:0];
      check(w.payload[14:8] == R_READ_REPLY, "reply word");
    end else if (p_left == 0) begin
      check(w.wtype == W_DATA && (w.payload[21:20] == SUB_TRIG_HDR || w.payload[21:20] == SUB_ADC_HDR),
            $sformatf("packet header expected, got %h", w));
      p_kind  = int'(w.payload[21:20]);
      p_board = int'(w.payload[19:13]) - 1;
      p_left  = int'(w.payload[12:0]);
      p_len   = p_left;
      p_idx   = 0;
      check(p_board >= 0 && p_board < NB, "board address");
      if (p_kind == int'(SUB_ADC_HDR)) begin
        if (last_trig_board == p_board) n_both++;
        if (p_len < 66) n_supp++; else n_full++;
      end
      last_trig_board = (p_kind == int'(SUB_TRIG_HDR)) ? p_board : -1;
    end else begin
      check(w.wtype == W_DATA && w.payload[21:20] == SUB_BODY, "body word");
      if (p_kind == int'(SUB_TRIG_HDR)) begin
        case (p_idx)
          0: p_ts[31:16] = w.payload[15:0];
          1: p_ts[15:0]  = w.payload[15:0];
          default: p_hits[16 * (5 - p_idx) +: 16] = w.payload[15:0];
        endcase
        if (p_left == 1) begin
          pk_trig[p_board]++;
          trig_ts[p_board].push_back(p_ts);
          last_hits[p_board] = p_hits;
        end
      end else begin
        if (p_idx == 0) p_ts[31:16] = w.payload[15:0];
        else if (p_idx == 1) begin
          bit found;
          p_ts[15:0] = w.payload[15:0];
          found = 0;
          foreach (trig_ts[p_board][i]) if (trig_ts[p_board][i] == p_ts) found = 1;
          check(found, $sformatf("ADC time-stamp %h of board %0d matches a trigger", p_ts, p_board));
        end else begin
          int ch;
          ch = int'(w.payload[17:12]);
          check(w.payload[11:0] == 12'((p_board * 1000 + ch * 37 + 11) % 4096),
                $sformatf("ADC value board %0d ch %0d", p_board, ch));
        end
        if (p_left == 1) pk_adc[p_board]++;
      end
      p_idx++;
      p_left--;
    end
  end

  // ---------------------------------------------------------------- stimulus
  task automatic ctrl(int board, logic [6:0] r, logic [7:0] d);
    @(negedge clk) host_cmd = {7'(board + 1), r, d}; host_cmd_valid = 1'b1;
    @(posedge clk);
    while (!host_cmd_ready) @(posedge clk);
    @(negedge clk) host_cmd_valid = 1'b0;
  endtask

  task automatic hit(int board, logic [63:0] chans);
    @(negedge clk);
    #3 comp[board] = chans;
    #4 comp[board] = '0;
  endtask

  task automatic hit2(int b1, int b2, logic [63:0] chans);
    @(negedge clk);
    #3 begin comp[b1] = chans; comp[b2] = chans; end
    #4 begin comp[b1] = '0; comp[b2] = '0; end
  endtask

  task automatic drain(int quiet);
    int q;
    q = 0;
    while (q < quiet) begin
      @(negedge clk);
      if (host_rx_valid || (|hold) || (|ev_tok_held)) q = 0; else q++;
    end
  endtask

  initial begin
    int tr0, tx0, ty0, to0 [NB];
    for (int b = 0; b < NB; b++) comp[b] = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) @(negedge clk);

    // Configuration: board 0 checks the sync period; board 1 reads all
    // channels; board 2 coincidence trigger-out; board 3 multiplicity >= 3.
    ctrl(0, R_MODE, 8'h23);
    ctrl(1, R_MODE, 8'h01);
    ctrl(2, R_MODE, 8'h0B);
    ctrl(3, R_MODE, 8'h13);
    ctrl(3, R_MULT, 8'd3);
    ctrl(2, R_READ_REQ, 8'(R_MODE));
    drain(200);
    check(n_reply == 1 && last_reply == 8'h0B, "read-back of board 2 mode");

    // G-port load on board 1.
    for (int i = 0; i < 6; i++) ctrl(1, 7'(i), 8'hA0 + 8'(i));
    ctrl(1, R_GLOAD, 8'd0);

    // Plain triggers on every board.
    hit(0, 64'h6);
    hit(1, 64'h1);
    hit(2, 64'h1);                           // one half only: no coincidence out
    repeat (50) @(negedge clk);
    to0[2] = n_to[2];
    hit(2, 64'h1_0000_0001);                 // both halves
    repeat (20) @(negedge clk);
    check(n_to[2] > to0[2], "board 2 coincidence trigger-out");
    to0[3] = n_to[3];
    hit(3, 64'h3);                           // two channels: below multiplicity
    repeat (20) @(negedge clk);
    check(n_to[3] == to0[3], "board 3: two hits give no trigger-out");
    repeat (3000) @(negedge clk);
    hit(3, 64'h70);                          // three channels
    repeat (20) @(negedge clk);
    check(n_to[3] > to0[3], "board 3: three hits give trigger-out");
    drain(3000);
    check(last_hits[0] == 64'h6 && last_hits[3] == 64'h70, "hit patterns");

    // Dead-time: a second hit 7 cycles after the first is lost.
    tr0 = n_trig[0];
    hit(0, 64'h8);
    repeat (6) @(negedge clk);
    hit(0, 64'h10);
    repeat (40) @(negedge clk);
    check(n_trig[0] == tr0 + 1, "hit in dead-time lost");
    drain(3000);
    check(last_hits[0] == 64'h8, "dead-time pattern");

    // Trigger box: fan-in, then X-Y coincidence, switched by a command.
    check(tbox_mode == 1'b0, "trigger box starts in fan-in mode");
    tx0 = n_tx; ty0 = n_ty;
    hit(0, 64'h1);
    repeat (20) @(negedge clk);
    check(n_tx > tx0 && n_ty == ty0, "fan-in: X only");
    drain(3000);
    ctrl(-1, R_MODE, 8'h01);
    drain(300);
    check(tbox_mode == 1'b1 && n_echo == 1, "trigger box switched to trigger mode over the link");
    tx0 = n_tx;
    hit(1, 64'h1);
    repeat (20) @(negedge clk);
    check(n_tx == tx0, "trigger mode: X alone gives nothing");
    drain(3000);
    hit2(0, 3, 64'h7);
    repeat (20) @(negedge clk);
    check(n_tx > tx0 && n_ty > ty0, "trigger mode: X and Y coincidence");
    drain(3000);

    // Conditional readout on board 0, box in coincidence mode: a hit on
    // board 0 alone loses its ADC data, one together with board 3 keeps it.
    ctrl(0, R_MODE, 8'h63);
    tr0 = n_done[0];
    hit(0, 64'h300);
    drain(3000);
    check(n_disc[0] == 1 && n_done[0] == tr0, "conditional: no X-Y answer, ADC data discarded");
    hit2(0, 3, 64'h700);
    drain(3000);
    check(n_disc[0] == 1 && n_done[0] == tr0 + 1, "conditional: X-Y answer, ADC data kept");
    ctrl(0, R_MODE, 8'h23);
    ctrl(-1, R_MODE, 8'h00);
    drain(300);
    check(tbox_mode == 1'b0 && n_echo == 2, "trigger box back to fan-in mode");

    // Sync twice, 1000 cycles apart: the period check of board 0 flags it.
    @(negedge clk) sync_gate = 1'b1;
    @(negedge clk) sync_gate = 1'b0;
    repeat (1000) @(negedge clk);
    @(negedge clk) sync_gate = 1'b1;
    @(negedge clk) sync_gate = 1'b0;
    repeat (20) @(negedge clk);
    ctrl(0, R_READ_REQ, 8'(R_SYNC_ERR));
    drain(300);
    check(n_reply == 2 && last_reply == 8'd1, "sync error counted");

    // Inhibit, then gated mode on board 0.
    inhibit = 1'b1;
    hit(1, 64'h2);
    repeat (20) @(negedge clk);
    inhibit = 1'b0;
    check(n_veto[1] == 1, "inhibit refuses trigger");
    ctrl(0, R_MODE, 8'h07);
    repeat (20) @(negedge clk);
    hit(0, 64'h4);
    repeat (20) @(negedge clk);
    check(n_veto[0] == 1, "gate low refuses trigger");
    @(negedge clk) sync_gate = 1'b1;
    repeat (8) @(negedge clk);
    tr0 = n_trig[0];
    hit(0, 64'h20);
    repeat (8) @(negedge clk);
    sync_gate = 1'b0;
    repeat (10) @(negedge clk);
    check(n_trig[0] == tr0 + 1, "gate high accepts trigger");
    ctrl(0, R_MODE, 8'h03);
    drain(3000);

    // Burst on board 3: fills the hit FIFO, ADC busy drops most triggers.
    for (int i = 0; i < 120; i++) begin
      hit(3, 64'(1) << (i % 64));
      repeat (10) @(negedge clk);
    end
    drain(5000);

    // --------------------------------------------------------------- results
    for (int b = 0; b < NB; b++) begin
      check(pk_trig[b] == n_trig[b] - n_ovf[b],
            $sformatf("board %0d: %0d trigger packets, %0d triggers written", b, pk_trig[b], n_trig[b] - n_ovf[b]));
      check(pk_adc[b] == n_done[b], $sformatf("board %0d: %0d ADC packets, %0d readouts", b, pk_adc[b], n_done[b]));
    end
    check(p_left == 0, "no packet cut short");
    check(n_link_ovf == 0, "no link word lost in a board or at the USB board");
    check(n_gload == 1, "G-port load on board 1");
    $display("mechanisms: trig=%0d ovf=%0d adc=%0d drop=%0d supp=%0d full=%0d pass=%0d held=%0d both=%0d sync=%0d gate=%0d veto=%0d tokens=%0d",
             n_trig[0] + n_trig[1] + n_trig[2] + n_trig[3], n_ovf[3], n_done[0] + n_done[1] + n_done[2] + n_done[3],
             n_drop[3], n_supp, n_full, n_pass, n_held, n_both, n_sync, n_gate, n_veto[0] + n_veto[1], tokens);
    $display("conditional readout: discarded=%0d", n_disc[0]);
    check(n_ovf[3] > 0, "mechanism: hit-FIFO overflow");
    check(n_drop[3] > 0, "mechanism: ADC busy drop");
    check(n_supp > 0, "mechanism: zero suppression");
    check(n_full > 0, "mechanism: full ADC readout");
    check(n_pass > 0, "mechanism: token passed empty");
    check(n_held > 0, "mechanism: token held");
    check(n_both > 0, "mechanism: trigger then ADC data in one token visit");
    check(n_sync >= 2, "mechanism: sync");
    check(n_gate > 0, "mechanism: gate");
    check(n_to[0] > 0 && n_to[1] > 0, "mechanism: trigger-out OR");
    check(n_disc[0] > 0, "mechanism: conditional readout discard");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
