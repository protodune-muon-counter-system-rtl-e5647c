// disc_latch: the 64 discriminator flip-flops of a PMT board and their
// synchronisers.
//
// Each Maroc2 comparator output clocks its own flip-flop, so a rising edge
// sets it however short the pulse is. The flip-flops are cleared
// asynchronously by clr, which the trigger logic holds high during the
// dead-time (and during reset). Each flip-flop is then synchronised to the
// 62.5 MHz clock by two flip-flops; hits shows a set flip-flop 2 to 3 cycles
// after the comparator edge. Edge setting, individual synchronisation and the
// dead-time clear follow the board description; the synchroniser depth is
// this design's choice. clr must come from a flip-flop (it is one in
// trigger_logic) since it resets 64 separately clocked flops.
module disc_latch #(
  parameter int unsigned N_CH = 64
) (
  input  logic            clk,
  input  logic [N_CH-1:0] comp,
  input  logic            clr,
  output logic [N_CH-1:0] hits
);
  logic [N_CH-1:0] disc, s1;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic q;
    always_ff @(posedge comp[i] or posedge clr) begin
      if (clr) q <= 1'b0;
      else     q <= 1'b1;
    end
    assign disc[i] = q;
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      s1   <= '0;
      hits <= '0;
    end else begin
      s1   <= disc;
      hits <= s1;
    end
  end
endmodule
