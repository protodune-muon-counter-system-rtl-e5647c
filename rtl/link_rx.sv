// link_rx: takes the 24-bit parallel output of the link deserializer into the
// local 62.5 MHz clock domain.
//
// The deserializer's word clock is passed through two flip-flops; on its
// detected rising edge the word, stable for the whole 8-cycle word period,
// is sampled. Idle words (type 0) are dropped; every other word gives a
// one-cycle valid with the word. Latency is 3 to 4 cycles after the word
// clock edge. Synchronisation to the local clock follows the board
// description; the way it is done is this design's choice.
module link_rx
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  link_word_t rx_word,
  input  logic       rx_wclk,
  output link_word_t word,
  output logic       valid
);
  logic c1, c2, c3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c1, c2, c3} <= '0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      c1 <= rx_wclk;
      c2 <= c1;
      c3 <= c2;
      valid <= 1'b0;
      if (c2 && !c3) begin
        word  <= rx_word;
        valid <= (rx_word.wtype != W_IDLE);
      end
    end
  end
endmodule
