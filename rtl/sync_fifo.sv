// sync_fifo: single-clock FIFO with show-ahead output.
//
// Used on the PMT board as the hit-pattern FIFO (96-bit trigger words), as
// the FIFO of ADC event descriptors (memory address and word count) and as
// the input buffer of the link node. dout shows the oldest word whenever
// empty is low; rd_en removes it. A write to a full FIFO or a read from an
// empty one is ignored. Writing and reading in the same cycle is allowed.
// count gives the number of words held. The depths are this design's choice.
module sync_fifo #(
  parameter int unsigned W     = 96,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [W-1:0]             din,
  input  logic                     rd_en,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
