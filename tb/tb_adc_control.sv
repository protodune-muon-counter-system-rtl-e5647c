// tb_adc_control: drives triggers into the ADC control logic and models the
// Maroc2 multiplexer (R port) and the external ADC. The multiplexer channel
// follows r_clk/r_d; on each convert clock the ADC model returns a value
// made from the channel number. Checks: hold rises hold_dly+2 cycles after
// trig_start and covers all 64 conversions; 64 R-clocks and 64 convert
// clocks; convert clocks SETTLE_CYC+1 cycles apart and at least SETTLE_CYC
// cycles after their R-clock; memory contents (time-stamp halves, then
// {channel, value} for the hit channels with suppression on, for all
// channels with it off); the descriptor {address, count}; a trigger during
// a readout is dropped; a full memory drops the trigger until space is given
// back; with conditional readout on, an event without a trigger-box answer
// inside the acceptance window (none at all, or one too late) writes no
// descriptor and its space is used again by the next event, while an answer
// 3 cycles after the trigger keeps it. SETTLE_CYC is set to 6 to keep the run short; the default readout
// length (64 x 33 cycles) is checked in the board-level test.
module tb_adc_control;
  import mc_pkg::*;
  localparam int SET = 6, AW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_en = 1'b1, adc_supp = 1'b1;
  logic [7:0] hold_dly = 8'd4;
  logic trig_start = 1'b0, ev_valid = 1'b0;
  trig_word_t ev = '0;
  logic hold, r_clk, r_d, adc_conv;
  logic [11:0] adc_data;
  logic mem_we;
  logic [AW-1:0] mem_waddr;
  logic [17:0] mem_wdata;
  logic desc_full = 1'b0, desc_we;
  logic [AW+6:0] desc;
  logic rel_valid = 1'b0;
  logic [6:0] rel_count = '0;
  logic busy, adc_drop, adc_discard;
  logic box_cond = 1'b0, box_trig = 1'b0;
  int checks = 0, failures = 0;

  always #8 clk = ~clk;

  adc_control #(.SETTLE_CYC(SET), .ADC_LAT(4), .AW(AW)) dut (
    .clk, .rst_n, .adc_en, .adc_supp, .hold_dly, .box_cond, .box_trig, .trig_start, .ev_valid, .ev,
    .hold, .r_clk, .r_d, .adc_conv, .adc_data, .mem_we, .mem_waddr, .mem_wdata,
    .desc_full, .desc_we, .desc, .rel_valid, .rel_count, .busy, .adc_drop, .adc_discard);

  // Maroc2 multiplexer and ADC models.
  int mux = -1, cyc = 0, t_rclk, t_conv_last, n_rclk, n_conv, n_drop, n_desc, n_disc;
  int t_trig, t_hold, hold_cycles, bad_spacing, bad_settle;
  logic [17:0] mem_log [$];
  logic [AW-1:0] addr_log [$];
  logic [AW+6:0] last_desc;
  function automatic logic [11:0] adc_val(int ch);
    return 12'(ch * 61 + 7);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (r_clk) begin
      mux = r_d ? 0 : mux + 1;
      n_rclk++;
      t_rclk = cyc;
    end
    if (adc_conv) begin
      adc_data <= adc_val(mux);
      n_conv++;
      if (n_conv > 1 && cyc - t_conv_last != SET + 1) bad_spacing++;
      if (cyc - t_rclk < SET) bad_settle++;
      t_conv_last = cyc;
    end
    if (trig_start && !busy) t_trig = cyc;
    if (hold) hold_cycles++;
    if (hold && hold_cycles == 1) t_hold = cyc;
    if (adc_drop) n_drop++;
    if (adc_discard) n_disc++;
    if (mem_we) begin mem_log.push_back(mem_wdata); addr_log.push_back(mem_waddr); end
    if (desc_we) begin n_desc++; last_desc = desc; end
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic trigger(trig_word_t w);
    @(negedge clk) trig_start = 1'b1;
    @(negedge clk) trig_start = 1'b0;
    repeat (2) @(negedge clk);
    ev = w; ev_valid = 1'b1;
    @(negedge clk) ev_valid = 1'b0;
  endtask

  task automatic run_event(trig_word_t w, bit supp, logic [7:0] hd);
    logic [17:0] exp [$];
    int n0, d0;
    adc_supp = supp; hold_dly = hd;
    mem_log.delete(); addr_log.delete();
    n_rclk = 0; n_conv = 0; hold_cycles = 0; bad_spacing = 0; bad_settle = 0;
    d0 = n_desc;
    trigger(w);
    wait (n_desc == d0 + 1);
    @(negedge clk);
    exp.push_back(18'(w.ts[31:16]));
    exp.push_back(18'(w.ts[15:0]));
    for (int c = 0; c < 64; c++) if (!supp || w.hits[c]) exp.push_back({6'(c), adc_val(c)});
    check(t_hold - t_trig == int'(hd) + 2, $sformatf("hold delay %0d vs %0d", t_hold - t_trig, hd + 2));
    check(n_rclk == 64 && n_conv == 64, $sformatf("%0d R-clocks, %0d converts", n_rclk, n_conv));
    check(bad_spacing == 0 && bad_settle == 0, "convert spacing and settling");
    check(hold_cycles >= 64 * (SET + 1), $sformatf("hold covers readout (%0d cycles)", hold_cycles));
    check(!hold, "hold released");
    check(mem_log.size() == exp.size(), $sformatf("%0d words vs %0d", mem_log.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < mem_log.size(); i++)
      check(mem_log[i] == exp[i], $sformatf("word %0d: %h vs %h", i, mem_log[i], exp[i]));
    check(last_desc[6:0] == 7'(exp.size()), "descriptor count");
    check(addr_log.size() > 0 && last_desc[AW+6:7] == addr_log[0], "descriptor address");
    for (int i = 1; i < addr_log.size(); i++) check(addr_log[i] == addr_log[i-1] + 1'b1, "consecutive addresses");
  endtask

  initial begin
    trig_word_t w;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    w.ts = 32'hCAFE_1234; w.hits = 64'h8000_0000_0001_0003;
    run_event(w, 1'b1, 8'd4);
    // Give back the space, then an unsuppressed event with a 0 hold delay.
    @(negedge clk) rel_valid = 1'b1; rel_count = 7'(mem_log.size());
    @(negedge clk) rel_valid = 1'b0;
    w.ts = 32'h0000_00FF; w.hits = 64'h1;
    run_event(w, 1'b0, 8'd0);
    // The memory (128 words) now holds 66 words: too little room for
    // another event until they are given back.
    n_drop = 0;
    trigger(w);
    repeat (20) @(negedge clk);
    check(n_drop == 1 && !busy, "no room: trigger dropped");
    @(negedge clk) rel_valid = 1'b1; rel_count = 7'd66;
    @(negedge clk) rel_valid = 1'b0;
    // A trigger during a readout gets no ADC data.
    w.ts = 32'h1234_5678; w.hits = 64'h0F00_0000_0000_0000;
    fork
      run_event(w, 1'b1, 8'd2);
      begin
        repeat (100) @(negedge clk);
        n_drop = 0;
        @(negedge clk) trig_start = 1'b1;
        @(negedge clk) trig_start = 1'b0;
        repeat (2) @(negedge clk);
        check(n_drop == 1, "busy: trigger dropped");
      end
    join
    // ADC readout disabled: nothing happens.
    adc_en = 1'b0; n_drop = 0;
    trigger(w);
    repeat (20) @(negedge clk);
    check(!busy && n_drop == 0, "ADC disabled");
    // Conditional readout: no trigger-box answer, the event is discarded.
    begin
      int d0;
      logic [AW-1:0] a0;
      adc_en = 1'b1; box_cond = 1'b1; n_disc = 0; d0 = n_desc;
      mem_log.delete(); addr_log.delete();
      trigger(w);
      wait (n_disc == 1);
      @(negedge clk);
      check(n_desc == d0 && !busy, "no answer: no descriptor");
      check(addr_log.size() == 6, $sformatf("discarded event wrote %0d words", addr_log.size()));
      a0 = addr_log.size() > 0 ? addr_log[0] : '0;
      // An answer after the 32-cycle window does not count.
      fork
        trigger(w);
        begin
          repeat (45) @(negedge clk);
          box_trig = 1'b1;
          @(negedge clk) box_trig = 1'b0;
        end
      join
      wait (n_disc == 2);
      @(negedge clk);
      check(n_desc == d0, "late answer: no descriptor");
      // An answer 3 cycles after the trigger keeps the event, written where
      // the discarded ones were.
      fork
        run_event(w, 1'b1, 8'd2);
        begin
          @(posedge trig_start);
          repeat (3) @(negedge clk);
          box_trig = 1'b1;
          @(negedge clk) box_trig = 1'b0;
        end
      join
      check(n_disc == 2 && n_desc == d0 + 1, "answered event kept");
      check(last_desc[AW+6:7] == a0, "discarded space used again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
