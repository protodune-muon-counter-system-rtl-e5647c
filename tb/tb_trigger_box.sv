// tb_trigger_box: random trigger-out levels from 2 X and 2 Y boards, in
// fan-in mode and in coincidence mode, compared with a model of the two
// outputs delayed by the 3-cycle latency (well under the 500 ns budget).
// The mode is switched by control words sent over a link at one word per 8
// cycles; the box must start in fan-in mode, take a mode word with its own
// address within 8 cycles, and ignore mode words for other addresses, other
// registers of its own address and data words with the same payload.
module tb_trigger_box;
  import mc_pkg::*;
  localparam int NX = 2, NY = 2, LAT = 3;
  localparam logic [6:0] BOX = 7'd9;
  logic clk = 1'b0, rst_n = 1'b0, mode_m = 1'b0, mode;
  link_word_t rx_word = '0;
  logic rx_wclk = 1'b0;
  logic [NX-1:0] tx = '0;
  logic [NY-1:0] ty = '0;
  logic trig_x, trig_y;
  logic [1:0] hist [$];
  int checks = 0, failures = 0, n_x = 0, n_y = 0;

  always #8 clk = ~clk;

  trigger_box #(.N_X(NX), .N_Y(NY), .BOX_ADDR(BOX)) dut (
    .clk, .rst_n, .trig_in_x(tx), .trig_in_y(ty), .rx_word, .rx_wclk, .mode, .trig_x, .trig_y);

  // One link word: held for 8 cycles, word clock high for the first 4.
  task automatic send(link_word_t w);
    @(negedge clk) rx_word = w; rx_wclk = 1'b1;
    repeat (4) @(negedge clk);
    rx_wclk = 1'b0;
    repeat (4) @(negedge clk);
    rx_word = '0;
  endtask

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(mode == 1'b0, "fan-in mode after reset");
    send(mk_word(W_CTRL, {BOX + 7'd1, R_MODE, 8'h01}));
    send(mk_word(W_CTRL, {BOX, R_HOLD_DLY, 8'h01}));
    send(mk_word(W_DATA, {BOX, R_MODE, 8'h01}));
    check(mode == 1'b0, "words not for the box ignored");
    for (int i = 0; i < 800; i++) begin
      logic ox, oy;
      @(negedge clk);
      if (i % 100 == 0) begin
        mode_m = ((i / 100) % 2) == 1;
        hist.delete();
        tx = '0; ty = '0;
        send(mk_word(W_CTRL, {BOX, R_MODE, 7'($urandom), mode_m}));
        check(mode == mode_m, $sformatf("mode word taken: %0d", mode_m));
      end
      tx = NX'($urandom_range(3) == 0 ? $urandom : 0);
      ty = NY'($urandom_range(3) == 0 ? $urandom : 0);
      ox = |tx; oy = |ty;
      hist.push_back(mode_m ? {ox & oy, ox & oy} : {ox, oy});
      if (hist.size() > LAT) begin
        check({trig_x, trig_y} == hist[0], $sformatf("cycle %0d mode %0d", i, mode_m));
        if (trig_x) n_x++;
        if (trig_y) n_y++;
        void'(hist.pop_front());
      end
    end
    check(n_x > 20 && n_y > 20, "outputs seen");
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
