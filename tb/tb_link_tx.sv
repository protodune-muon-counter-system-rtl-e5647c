// tb_link_tx: offers random words with random gaps and checks, at each rising
// edge of the word clock, that the words come out in order, one per 8
// clocks, with idle words in between, and that the word clock has a period
// of exactly 8 cycles.
module tb_link_tx;
  import mc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  link_word_t word = '0, tx_word;
  logic valid = 1'b0, ready, tx_wclk, wclk_q = 1'b0;
  link_word_t sent [$];
  int checks = 0, failures = 0, cyc = 0, last_edge = -1, n_idle = 0, n_words = 0;

  always #8 clk = ~clk;

  link_tx #(.DIV(8)) dut (.clk, .rst_n, .word, .valid, .ready, .tx_word, .tx_wclk);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Sender: valid/ready handshake.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && valid && ready) begin
      sent.push_back(word);
      valid <= 1'b0;
    end else if (rst_n && !valid && $urandom_range(99) < 30) begin
      valid <= 1'b1;
      word  <= mk_word(word_type_e'($urandom_range(1, 3)), PW'($urandom));
    end
  end

  // Receiver: sample on word-clock rising edges.
  always @(posedge clk) begin
    wclk_q <= tx_wclk;
    if (rst_n && tx_wclk && !wclk_q) begin
      if (last_edge >= 0) check(cyc - last_edge == 8, "word clock period");
      last_edge = cyc;
      if (tx_word.wtype == W_IDLE) n_idle++;
      else begin
        n_words++;
        check(sent.size() != 0 && tx_word == sent[0], "word order");
        if (sent.size() != 0) void'(sent.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4000) @(negedge clk);
    check(n_words > 100 && n_idle > 20, $sformatf("%0d words, %0d idle", n_words, n_idle));
    check(n_words + n_idle >= 4000 / 8 - 2, "one word per 8 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
