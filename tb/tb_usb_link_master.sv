// tb_usb_link_master: the USB board's link logic against a model of the
// chain. The model receives the ring words (through link_rx), keeps each
// token for a random time, sends random data packets ahead of it, and
// returns everything through link_tx. The PC side sends control words and
// reads with a random ready. Checks: a token goes out after reset; never two
// tokens in the ring; a new one follows each return; control words appear
// on the ring in order; every data word reaches the PC in order; the round
// trip counter.
module tb_usb_link_master;
  import mc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [PW-1:0] host_cmd = '0;
  logic host_cmd_valid = 1'b0, host_cmd_ready;
  link_word_t host_rx;
  logic host_rx_valid, host_rx_ready = 1'b0;
  link_word_t tx_word, rx_word, m_in, m_out;
  logic tx_wclk, rx_wclk, m_in_v, m_out_v, m_out_rdy;
  logic [31:0] tokens;
  int checks = 0, failures = 0;
  int in_ring = 0, max_in_ring = 0, n_tok_seen = 0, n_data_sent = 0, n_data_got = 0;
  link_word_t ctrl_exp [$], data_exp [$], ret_q [$];
  int hold_tok = 0;

  always #8 clk = ~clk;

  usb_link_master #(.RX_DEPTH(64)) dut (
    .clk, .rst_n, .host_cmd, .host_cmd_valid, .host_cmd_ready, .host_rx, .host_rx_valid,
    .host_rx_ready, .tx_word, .tx_wclk, .rx_word, .rx_wclk, .tokens, .rx_ovf());

  // Chain model.
  link_rx m_rx (.clk, .rst_n, .rx_word(tx_word), .rx_wclk(tx_wclk), .word(m_in), .valid(m_in_v));
  link_tx m_tx (.clk, .rst_n, .word(m_out), .valid(m_out_v), .ready(m_out_rdy), .tx_word(rx_word), .tx_wclk(rx_wclk));

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin m_out = '0; m_out_v = 1'b0; end

  always @(posedge clk) if (rst_n) begin
    if (m_out_v && m_out_rdy) void'(ret_q.pop_front());
    if (m_in_v) begin
      if (m_in.wtype == W_TOKEN) begin
        in_ring++;
        n_tok_seen++;
        if (in_ring > max_in_ring) max_in_ring = in_ring;
        hold_tok = $urandom_range(5, 60);
      end else begin
        check(ctrl_exp.size() != 0 && m_in == ctrl_exp[0], "control word on ring");
        if (ctrl_exp.size() != 0) void'(ctrl_exp.pop_front());
      end
    end
    if (hold_tok > 0) begin
      hold_tok--;
      if ($urandom_range(9) == 0) begin
        link_word_t d;
        d = mk_word(W_DATA, PW'($urandom));
        ret_q.push_back(d);
        data_exp.push_back(d);
        n_data_sent++;
      end
      if (hold_tok == 0) begin
        ret_q.push_back(mk_word(W_TOKEN, '0));
        in_ring--;
      end
    end
    m_out   <= ret_q.size() != 0 ? ret_q[0] : '0;
    m_out_v <= ret_q.size() != 0;
    host_rx_ready <= ($urandom_range(3) != 0);
    if (host_rx_valid && host_rx_ready) begin
      n_data_got++;
      check(data_exp.size() != 0 && host_rx == data_exp[0], "data to PC in order");
      if (data_exp.size() != 0) void'(data_exp.pop_front());
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 30; i++) begin
      repeat ($urandom_range(50, 400)) @(negedge clk);
      host_cmd = PW'($urandom);
      host_cmd_valid = 1'b1;
      ctrl_exp.push_back(mk_word(W_CTRL, host_cmd));
      @(posedge clk);
      while (!host_cmd_ready) @(posedge clk);
      @(negedge clk) host_cmd_valid = 1'b0;
    end
    repeat (3000) @(negedge clk);
    check(n_tok_seen > 20, $sformatf("%0d tokens circulated", n_tok_seen));
    check(max_in_ring == 1, "never two tokens");
    check(int'(tokens) >= n_tok_seen - 1 && int'(tokens) <= n_tok_seen, "round-trip count");
    check(ctrl_exp.size() == 0, "all control words sent");
    check(n_data_sent > 10 && n_data_got == n_data_sent, $sformatf("%0d of %0d data words", n_data_got, n_data_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
