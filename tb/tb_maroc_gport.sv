// tb_maroc_gport: loads 70 random set-up bytes through the G port and
// reassembles them from g_d sampled on the rising edges of g_clk: byte 0
// first, most significant bit first. Checks the bit count, the bytes, one
// load pulse after the last bit, busy, and the g_clk period (CLK_DIV = 4).
module tb_maroc_gport;
  localparam int NB = 70, DIV = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] bytes [NB];
  logic g_clk, g_d, g_load, busy, gclk_q = 1'b0, load_q = 1'b0;
  logic [7:0] got [NB];
  int checks = 0, failures = 0, nbits = 0, n_load = 0, cyc = 0, last = -1, bad_per = 0;
  int bits_at_load = -1;

  always #8 clk = ~clk;

  maroc_gport #(.N_BYTES(NB), .CLK_DIV(DIV)) dut (.clk, .rst_n, .start, .bytes, .g_clk, .g_d, .g_load, .busy);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    gclk_q <= g_clk;
    load_q <= g_load;
    if (rst_n && g_clk && !gclk_q) begin
      if (nbits < 8 * NB) got[nbits / 8][7 - nbits % 8] = g_d;
      nbits++;
      if (last >= 0 && cyc - last != DIV) bad_per++;
      last = cyc;
    end
    if (rst_n && g_load && !load_q) begin n_load++; bits_at_load = nbits; end
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < NB; i++) bytes[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(busy, "busy after start");
    wait (!busy);
    repeat (5) @(negedge clk);
    check(nbits == 8 * NB, $sformatf("%0d bits", nbits));
    check(n_load == 1 && bits_at_load == 8 * NB, "one load pulse after the last bit");
    check(bad_per == 0, "g_clk period");
    for (int i = 0; i < NB; i++) check(got[i] == bytes[i], $sformatf("byte %0d: %h vs %h", i, got[i], bytes[i]));
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
