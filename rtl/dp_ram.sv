// dp_ram: simple dual-port memory (one write port, one read port, one clock)
// holding the ADC event packets of a PMT board.
//
// The ADC logic writes an event's time-stamp and its (channel, ADC value)
// words here while the link node reads earlier events out. Read data appear
// one cycle after raddr (registered read, as in FPGA block memory). The
// width, 6-bit channel number plus 12-bit ADC value, and the depth are this
// design's choice.
module dp_ram #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
