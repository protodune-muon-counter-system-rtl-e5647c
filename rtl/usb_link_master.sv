// usb_link_master: the link side of the USB readout board, which closes the
// daisy chain of PMT boards into a token ring.
//
// It sends words into the first board of the chain through its own link_tx
// and receives the words leaving the last board through link_rx. A token is
// sent after reset and then again each time the previous token comes back
// from the end of the chain, so exactly one token circulates. Control words
// from the PC (host_cmd, a 22-bit payload) are sent into the ring ahead of
// the next token. Every data and control word that comes back is queued for
// the PC (host_rx, valid/ready, RX_DEPTH words); a word that finds the queue
// full is lost and rx_ovf pulses. tokens counts the round trips.
// Token recirculation and passing the packets to the PC follow the board
// description; the PC-side interface is this design's choice.
module usb_link_master
  import mc_pkg::*;
#(
  parameter int unsigned RX_DEPTH = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  // PC side
  input  logic [PW-1:0] host_cmd,
  input  logic          host_cmd_valid,
  output logic          host_cmd_ready,
  output link_word_t    host_rx,
  output logic          host_rx_valid,
  input  logic          host_rx_ready,
  // ring
  output link_word_t    tx_word,
  output logic          tx_wclk,
  input  link_word_t    rx_word,
  input  logic          rx_wclk,
  output logic [31:0]   tokens,
  output logic          rx_ovf
);
  link_word_t in_w, send_w;
  logic       in_v, send_v, send_rdy, token_out, q_full, q_empty;

  link_rx u_rx (.clk, .rst_n, .rx_word, .rx_wclk, .word(in_w), .valid(in_v));

  // A control word goes first; otherwise the token when it is home.
  always_comb begin
    if (host_cmd_valid) begin
      send_w = mk_word(W_CTRL, host_cmd);
      send_v = 1'b1;
    end else begin
      send_w = mk_word(W_TOKEN, '0);
      send_v = !token_out;
    end
  end
  assign host_cmd_ready = send_rdy;

  link_tx u_tx (.clk, .rst_n, .word(send_w), .valid(send_v), .ready(send_rdy),
                .tx_word, .tx_wclk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      token_out <= 1'b0;
      tokens    <= '0;
      rx_ovf    <= 1'b0;
    end else begin
      rx_ovf <= in_v && in_w.wtype != W_TOKEN && q_full;
      if (send_rdy && !host_cmd_valid && !token_out) token_out <= 1'b1;
      if (in_v && in_w.wtype == W_TOKEN) begin
        token_out <= 1'b0;
        tokens    <= tokens + 32'd1;
      end
    end
  end

  sync_fifo #(.W(LW), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n, .wr_en(in_v && in_w.wtype != W_TOKEN), .din(in_w),
    .rd_en(host_rx_ready), .dout(host_rx), .empty(q_empty), .full(q_full), .count()
  );
  assign host_rx_valid = !q_empty;
endmodule
