// tb_token_node: drives the link node of one board (address 3) with words
// from "downstream" and plays the upstream serializer (ready once every 8
// cycles). The hit FIFO, descriptor FIFO and ADC memory are real instances
// filled by the testbench. Checks: data words and control words for other
// boards are forwarded unchanged; a control write to this board reaches the
// register port and is not forwarded; a read request is answered with the
// register value; a token with no data is passed on at once; with data the
// token is held and the trigger packet (header + 6 words), then the ADC
// packet (header + memory words), then the token go out, and the memory
// space is given back; a word that arrives while the token is held is
// handled afterwards.
module tb_token_node;
  import mc_pkg::*;
  localparam int AW = 10;
  localparam logic [6:0] ME = 7'd3;
  logic clk = 1'b0, rst_n = 1'b0;
  link_word_t in_word = '0, out_word;
  logic in_valid = 1'b0, out_valid, out_ready;
  // hit FIFO
  logic hf_we = 1'b0, hf_empty, hf_rd, hf_full;
  trig_word_t hf_din = '0, hf_dout;
  // descriptor FIFO and memory
  logic df_we = 1'b0, df_empty, df_rd, df_full;
  logic [AW+6:0] df_din = '0, df_dout;
  logic mem_we = 1'b0;
  logic [AW-1:0] mem_waddr = '0, mem_raddr;
  logic [17:0] mem_wdata = '0, mem_rdata;
  logic rel_valid;
  logic [6:0] rel_count;
  logic reg_we;
  logic [6:0] reg_waddr, reg_raddr;
  logic [7:0] reg_wdata, reg_rdata;
  logic tok_passed, tok_held;
  logic [7:0] regs [128];
  int checks = 0, failures = 0, cyc = 0, n_rel = 0, rel_sum = 0, n_pass = 0, n_held = 0;
  link_word_t outq [$];
  int n_regw = 0;

  always #8 clk = ~clk;

  token_node #(.AW(AW)) dut (
    .clk, .rst_n, .my_addr(ME), .in_word, .in_valid, .out_word, .out_valid, .out_ready,
    .hf_empty, .hf_dout, .hf_rd, .df_empty, .df_dout, .df_rd, .mem_raddr, .mem_rdata,
    .rel_valid, .rel_count, .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .tok_passed, .tok_held, .in_ovf());

  sync_fifo #(.W(96), .DEPTH(8)) u_hf (.clk, .rst_n, .wr_en(hf_we), .din(hf_din), .rd_en(hf_rd),
    .dout(hf_dout), .empty(hf_empty), .full(hf_full), .count());
  sync_fifo #(.W(AW + 7), .DEPTH(8)) u_df (.clk, .rst_n, .wr_en(df_we), .din(df_din), .rd_en(df_rd),
    .dout(df_dout), .empty(df_empty), .full(df_full), .count());
  dp_ram #(.W(18), .DEPTH(1 << AW)) u_mem (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata));

  assign out_ready = (cyc % 8 == 7);
  assign reg_rdata = regs[reg_raddr];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (out_valid && out_ready) outq.push_back(out_word);
      if (rel_valid) begin n_rel++; rel_sum += int'(rel_count); end
      if (tok_passed) n_pass++;
      if (tok_held) n_held++;
      if (reg_we) begin regs[reg_waddr] <= reg_wdata; n_regw++; end
    end
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(link_word_t w);
    @(negedge clk) in_word = w; in_valid = 1'b1;
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  task automatic expect_out(link_word_t w, string msg);
    int t;
    t = 0;
    while (outq.size() == 0 && t < 400) begin @(negedge clk); t++; end
    if (outq.size() == 0) check(1'b0, {msg, ": nothing sent"});
    else begin
      check(outq[0] == w, $sformatf("%s: %h vs %h", msg, outq[0], w));
      void'(outq.pop_front());
    end
  endtask

  task automatic add_trig(trig_word_t t);
    @(negedge clk) hf_din = t; hf_we = 1'b1;
    @(negedge clk) hf_we = 1'b0;
  endtask

  task automatic add_adc(logic [AW-1:0] base, logic [17:0] w [$]);
    for (int i = 0; i < w.size(); i++) begin
      @(negedge clk) mem_we = 1'b1; mem_waddr = base + AW'(i); mem_wdata = w[i];
    end
    @(negedge clk) mem_we = 1'b0; df_din = {base, 7'(w.size())}; df_we = 1'b1;
    @(negedge clk) df_we = 1'b0;
  endtask

  task automatic expect_trig(trig_word_t t);
    expect_out(mk_word(W_DATA, mk_hdr(SUB_TRIG_HDR, ME, 13'd6)), "trigger header");
    expect_out(mk_word(W_DATA, {SUB_BODY, 4'd0, t.ts[31:16]}), "ts high");
    expect_out(mk_word(W_DATA, {SUB_BODY, 4'd0, t.ts[15:0]}), "ts low");
    for (int k = 3; k >= 0; k--)
      expect_out(mk_word(W_DATA, {SUB_BODY, 4'd0, t.hits[16*k +: 16]}), $sformatf("hits %0d", k));
  endtask

  task automatic expect_adc(logic [17:0] w [$]);
    expect_out(mk_word(W_DATA, mk_hdr(SUB_ADC_HDR, ME, 13'(w.size()))), "ADC header");
    for (int i = 0; i < w.size(); i++) expect_out(mk_word(W_DATA, {SUB_BODY, 2'd0, w[i]}), $sformatf("ADC word %0d", i));
  endtask

  initial begin
    link_word_t w;
    trig_word_t t1, t2;
    logic [17:0] a1 [$], a2 [$];
    for (int i = 0; i < 128; i++) regs[i] = 8'(i * 3);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // Forwarding.
    w = mk_word(W_DATA, 22'h2ABCDE);         send(w); expect_out(w, "data forwarded");
    w = mk_word(W_CTRL, {7'd5, 7'h10, 8'h55}); send(w); expect_out(w, "foreign control forwarded");
    // Control write and read for this board.
    send(mk_word(W_CTRL, {ME, R_HOLD_DLY, 8'h22}));
    repeat (20) @(negedge clk);
    check(n_regw == 1 && regs[R_HOLD_DLY] == 8'h22 && outq.size() == 0, "control write consumed");
    send(mk_word(W_CTRL, {ME, R_READ_REQ, 8'(R_HOLD_DLY)}));
    expect_out(mk_word(W_CTRL, {ME, R_READ_REPLY, 8'h22}), "read reply");
    // Token, no data.
    send(mk_word(W_TOKEN, '0));
    expect_out(mk_word(W_TOKEN, '0), "token passed");
    check(n_pass == 1 && n_held == 0, "token passed without data");
    // Token with trigger and ADC data; a control word arrives meanwhile.
    t1.ts = 32'h1357_9BDF; t1.hits = 64'hDEAD_BEEF_0123_4567;
    add_trig(t1);
    a1 = '{18'h0_1234, 18'h0_5678, {6'd3, 12'hABC}, {6'd40, 12'h00F}};
    add_adc(10'd1022, a1);                   // wraps around the end of memory
    send(mk_word(W_TOKEN, '0));
    w = mk_word(W_DATA, 22'h15555);
    send(w);
    expect_trig(t1);
    expect_adc(a1);
    expect_out(mk_word(W_TOKEN, '0), "token after data");
    expect_out(w, "word held back while sending");
    check(n_held == 1 && n_rel == 1 && rel_sum == 4, "token held, memory given back");
    // Only ADC data, then only trigger data.
    a2 = '{18'h0_0001, 18'h0_0002};
    add_adc(10'd40, a2);
    send(mk_word(W_TOKEN, '0));
    expect_adc(a2);
    expect_out(mk_word(W_TOKEN, '0), "token after ADC data");
    t2.ts = 32'h0000_0001; t2.hits = 64'h1;
    add_trig(t2);
    send(mk_word(W_TOKEN, '0));
    expect_trig(t2);
    expect_out(mk_word(W_TOKEN, '0), "token after trigger data");
    repeat (50) @(negedge clk);
    check(outq.size() == 0 && hf_empty && df_empty, "nothing left");
    check(n_held == 3 && n_rel == 2, "held count");
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
