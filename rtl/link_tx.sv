// link_tx: drives the 24-bit parallel input of the link serializer.
//
// The serializer runs at 1/8 of the 62.5 MHz clock, so one 24-bit word goes
// out every DIV = 8 cycles. tx_wclk is the word clock (high for the first
// half of each period); tx_word changes with its rising edge and is stable
// for the whole period. A word offered on word/valid is taken (ready = 1) on
// the last cycle of a period and sent in the next one; when none is offered
// an idle word (type 0) is sent. The 1/8 rate follows the board description;
// the idle word and the handshake are this design's choice.
module link_tx
  import mc_pkg::*;
#(
  parameter int unsigned DIV = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_word_t word,
  input  logic       valid,
  output logic       ready,
  output link_word_t tx_word,
  output logic       tx_wclk
);
  logic [$clog2(DIV)-1:0] cnt;

  assign ready = (32'(cnt) == DIV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      tx_word <= '0;
      tx_wclk <= 1'b0;
    end else begin
      cnt <= (32'(cnt) == DIV - 1) ? '0 : cnt + 1'b1;
      if (32'(cnt) == DIV - 1) begin
        tx_word <= valid ? word : '0;
        tx_wclk <= 1'b1;
      end else if (32'(cnt) == DIV / 2 - 1) begin
        tx_wclk <= 1'b0;
      end
    end
  end
endmodule
