// maroc_gport: loads the Maroc2 set-up registers through the chip's 3-wire
// G port.
//
// On start the N_BYTES set-up bytes (3 switch bytes, 3 DAC bytes, 64 gain
// bytes) are shifted out, byte 0 first and most significant bit first, on
// g_d with g_clk at clk/CLK_DIV: g_d changes while g_clk is low and is taken
// on its rising edge. After the last bit g_load is high for one g_clk period
// to latch the shifted data. busy is high from start to the end of g_load.
// One load takes (8*N_BYTES + 1)*CLK_DIV cycles (about 72 us at the
// defaults). The byte content follows the board description; the wire
// meanings, bit order and rate are this design's choice.
module maroc_gport #(
  parameter int unsigned N_BYTES = 70,
  parameter int unsigned CLK_DIV = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] bytes [N_BYTES],
  output logic       g_clk,
  output logic       g_d,
  output logic       g_load,
  output logic       busy
);
  localparam int unsigned NBITS = 8 * N_BYTES;
  logic [$clog2(CLK_DIV)-1:0] div;
  logic [$clog2(NBITS+1)-1:0] bitn;
  logic                       loading;
  logic [$clog2(N_BYTES)-1:0] byte_i;
  logic [2:0]                 bit_i;

  assign byte_i = bitn[$clog2(NBITS+1)-1:3];
  assign bit_i  = 3'd7 - bitn[2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div     <= '0;
      bitn    <= '0;
      busy    <= 1'b0;
      loading <= 1'b0;
      g_clk   <= 1'b0;
      g_d     <= 1'b0;
      g_load  <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        div  <= '0;
        bitn <= '0;
      end
    end else begin
      div <= (32'(div) == CLK_DIV - 1) ? '0 : div + 1'b1;
      if (div == 0) begin
        g_clk <= 1'b0;
        if (32'(bitn) < NBITS) begin
          g_d <= bytes[byte_i][bit_i];
        end else if (!loading) begin
          g_d     <= 1'b0;
          g_load  <= 1'b1;
          loading <= 1'b1;
        end else begin
          g_load  <= 1'b0;
          loading <= 1'b0;
          busy    <= 1'b0;
        end
      end else if (32'(div) == CLK_DIV / 2) begin
        if (32'(bitn) < NBITS) begin
          g_clk <= 1'b1;
          bitn  <= bitn + 1'b1;
        end
      end
    end
  end
endmodule
