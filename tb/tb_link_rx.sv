// tb_link_rx: plays the deserializer: a new word every 8 cycles with its word
// clock, at a phase unrelated to the local clock (the source clock is offset
// by 5 ns). Checks that every non-idle word is delivered exactly once, in
// order, and that idle words are dropped.
module tb_link_rx;
  import mc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sclk = 1'b0;
  link_word_t rx_word = '0, word;
  logic rx_wclk = 1'b0, valid;
  link_word_t exp [$];
  int checks = 0, failures = 0, n_got = 0, n_sent = 0;

  always #8 clk = ~clk;
  initial begin #5; forever #8 sclk = ~sclk; end

  link_rx dut (.clk, .rst_n, .rx_word, .rx_wclk, .word, .valid);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(posedge sclk);
      rx_wclk = 1'b1;
      if ($urandom_range(3) == 0) rx_word = '0;
      else begin
        rx_word = mk_word(word_type_e'($urandom_range(1, 3)), PW'($urandom));
        exp.push_back(rx_word);
        n_sent++;
      end
      repeat (4) @(posedge sclk);
      rx_wclk = 1'b0;
      repeat (3) @(posedge sclk);
    end
    repeat (20) @(negedge clk);
    check(n_got == n_sent && exp.size() == 0, $sformatf("%0d of %0d words", n_got, n_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid) begin
    n_got++;
    check(exp.size() != 0 && word == exp[0], "word order");
    if (exp.size() != 0) void'(exp.pop_front());
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
