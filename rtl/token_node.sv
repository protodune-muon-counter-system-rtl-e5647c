// token_node: the link node of a PMT board in the token-passing readout ring.
//
// Words from the downstream board (through link_rx) enter a small input FIFO
// and are handled one at a time:
//  - data words, and control words for other boards, are forwarded upstream;
//  - a control word for this board (address = my_addr) writes a register,
//    or, with register 0x7F, asks for register <data>; the value goes
//    upstream as a control word with register 0x7E;
//  - the token: if the board has nothing to send it is forwarded at once.
//    Otherwise it is held while one trigger event (hit-pattern FIFO) and
//    then one ADC event (descriptor FIFO and dual-port memory) are sent,
//    trigger data first, and is then passed on.
// A trigger event is a header (sub-type 1, address, count 6) and six 16-bit
// words: time-stamp high, low, hits 63:48, 47:32, 31:16, 15:0. An ADC event
// is a header (sub-type 2, address, word count) and the memory words: two
// time-stamp halves, then {channel, ADC value}. After an ADC event has been
// read its memory space is given back (rel_valid/rel_count).
// Outgoing words are offered to link_tx with a valid/ready handshake, so a
// word leaves every 8 cycles. Token holding and passing, the word types,
// trigger-before-ADC order and the 7-bit address follow the readout
// description; packet and control layouts are this design's choice.
module token_node
  import mc_pkg::*;
#(
  parameter int unsigned AW          = 10,
  parameter int unsigned IFIFO_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADDR_W-1:0]   my_addr,
  // from link_rx
  input  link_word_t          in_word,
  input  logic                in_valid,
  // to link_tx
  output link_word_t          out_word,
  output logic                out_valid,
  input  logic                out_ready,
  // hit-pattern FIFO
  input  logic                hf_empty,
  input  trig_word_t          hf_dout,
  output logic                hf_rd,
  // ADC descriptor FIFO and memory
  input  logic                df_empty,
  input  logic [AW+6:0]       df_dout,
  output logic                df_rd,
  output logic [AW-1:0]       mem_raddr,
  input  logic [MEM_W-1:0]    mem_rdata,
  output logic                rel_valid,
  output logic [6:0]          rel_count,
  // registers
  output logic                reg_we,
  output logic [6:0]          reg_waddr,
  output logic [7:0]          reg_wdata,
  output logic [6:0]          reg_raddr,
  input  logic [7:0]          reg_rdata,
  // event strobes
  output logic                tok_passed,
  output logic                tok_held,
  output logic                in_ovf
);
  typedef enum logic [3:0] {
    S_IDLE, S_OUT, S_TRIG, S_ADC_HDR, S_ADC_RD, S_ADC_WAIT, S_ADC_SEND,
    S_ADC_END, S_TOKEN
  } state_e;
  state_e state, ret;

  link_word_t    if_dout;
  logic          if_empty, if_full, if_rd;
  ctrl_payload_t cp;
  logic [2:0]    tidx;
  logic [6:0]    aidx;
  logic [AW-1:0] abase;
  logic [6:0]    acnt;
  logic [15:0]   tchunk;

  sync_fifo #(.W(LW), .DEPTH(IFIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .wr_en(in_valid), .din(in_word), .rd_en(if_rd),
    .dout(if_dout), .empty(if_empty), .full(if_full), .count()
  );

  assign cp        = ctrl_payload_t'(if_dout.payload);
  assign reg_raddr = cp.data[6:0];
  assign if_rd     = (state == S_IDLE) && !if_empty;
  assign abase     = df_dout[AW+6:7];
  assign acnt      = df_dout[6:0];

  always_comb begin
    case (tidx)
      3'd0:    tchunk = hf_dout.ts[31:16];
      3'd1:    tchunk = hf_dout.ts[15:0];
      3'd2:    tchunk = hf_dout.hits[63:48];
      3'd3:    tchunk = hf_dout.hits[47:32];
      3'd4:    tchunk = hf_dout.hits[31:16];
      default: tchunk = hf_dout.hits[15:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ret        <= S_IDLE;
      out_word   <= '0;
      out_valid  <= 1'b0;
      tidx       <= '0;
      aidx       <= '0;
      mem_raddr  <= '0;
      hf_rd      <= 1'b0;
      df_rd      <= 1'b0;
      rel_valid  <= 1'b0;
      rel_count  <= '0;
      reg_we     <= 1'b0;
      reg_waddr  <= '0;
      reg_wdata  <= '0;
      tok_passed <= 1'b0;
      tok_held   <= 1'b0;
      in_ovf     <= 1'b0;
    end else begin
      hf_rd      <= 1'b0;
      df_rd      <= 1'b0;
      rel_valid  <= 1'b0;
      reg_we     <= 1'b0;
      tok_passed <= 1'b0;
      tok_held   <= 1'b0;
      in_ovf     <= in_valid && if_full;
      case (state)
        S_IDLE: if (!if_empty) begin
          case (if_dout.wtype)
            W_TOKEN: begin
              if (!hf_empty) begin
                tok_held  <= 1'b1;
                out_word  <= mk_word(W_DATA, mk_hdr(SUB_TRIG_HDR, my_addr, 13'd6));
                out_valid <= 1'b1;
                tidx      <= '0;
                state     <= S_OUT;
                ret       <= S_TRIG;
              end else if (!df_empty) begin
                tok_held <= 1'b1;
                state    <= S_ADC_HDR;
              end else begin
                tok_passed <= 1'b1;
                out_word   <= if_dout;
                out_valid  <= 1'b1;
                state      <= S_OUT;
                ret        <= S_IDLE;
              end
            end
            W_CTRL: begin
              if (cp.addr == my_addr) begin
                if (cp.reg_no == R_READ_REQ) begin
                  out_word  <= mk_word(W_CTRL, {my_addr, R_READ_REPLY, reg_rdata});
                  out_valid <= 1'b1;
                  state     <= S_OUT;
                  ret       <= S_IDLE;
                end else begin
                  reg_we    <= 1'b1;
                  reg_waddr <= cp.reg_no;
                  reg_wdata <= cp.data;
                end
              end else begin
                out_word  <= if_dout;
                out_valid <= 1'b1;
                state     <= S_OUT;
                ret       <= S_IDLE;
              end
            end
            default: begin
              out_word  <= if_dout;
              out_valid <= 1'b1;
              state     <= S_OUT;
              ret       <= S_IDLE;
            end
          endcase
        end
        S_OUT: if (out_ready) begin
          out_valid <= 1'b0;
          state     <= ret;
        end
        S_TRIG: begin
          out_word  <= mk_word(W_DATA, {SUB_BODY, 4'd0, tchunk});
          out_valid <= 1'b1;
          tidx      <= tidx + 3'd1;
          state     <= S_OUT;
          if (tidx == 3'd5) begin
            hf_rd <= 1'b1;
            ret   <= df_empty ? S_TOKEN : S_ADC_HDR;
          end else begin
            ret   <= S_TRIG;
          end
        end
        S_ADC_HDR: begin
          out_word  <= mk_word(W_DATA, mk_hdr(SUB_ADC_HDR, my_addr, 13'(acnt)));
          out_valid <= 1'b1;
          aidx      <= '0;
          state     <= S_OUT;
          ret       <= S_ADC_RD;
        end
        S_ADC_RD: begin
          mem_raddr <= abase + AW'(aidx);
          state     <= S_ADC_WAIT;
        end
        S_ADC_WAIT: state <= S_ADC_SEND;
        S_ADC_SEND: begin
          out_word  <= mk_word(W_DATA, {SUB_BODY, 2'd0, mem_rdata});
          out_valid <= 1'b1;
          aidx      <= aidx + 7'd1;
          state     <= S_OUT;
          ret       <= (aidx + 7'd1 < acnt) ? S_ADC_RD : S_ADC_END;
        end
        S_ADC_END: begin
          df_rd     <= 1'b1;
          rel_valid <= 1'b1;
          rel_count <= acnt;
          state     <= S_TOKEN;
        end
        default: begin  // S_TOKEN
          out_word  <= mk_word(W_TOKEN, '0);
          out_valid <= 1'b1;
          state     <= S_OUT;
          ret       <= S_IDLE;
        end
      endcase
    end
  end
endmodule
