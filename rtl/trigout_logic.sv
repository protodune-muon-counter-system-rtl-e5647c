// trigout_logic: the hardware trigger-out of a PMT board, meant for a scaler
// or the trigger box.
//
// Three modes, chosen through the DAQ: TO_OR gives the OR of the 64
// synchronised discriminator bits (the board's basic trigger output);
// TO_COINC asks for a local coincidence, a hit in channels 0-31 and in
// channels 32-63 (two layers read by one multi-anode tube); TO_MULT asks for
// at least mult_thr channels hit. The OR output follows the board
// description; the description asks for richer local logic without fixing
// it, so the coincidence split and the multiplicity mode are this design's
// choice. The output is registered: one cycle after hits.
module trigout_logic
  import mc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  hits,
  input  trigout_mode_e mode,
  input  logic [6:0]    mult_thr,
  output logic          trig_out
);
  logic [7:0] pop;
  logic       t_or, t_coinc, t_mult, t_next;

  always_comb begin
    pop = '0;
    for (int i = 0; i < N; i++) pop = pop + 8'(hits[i]);
  end

  assign t_or    = |hits;
  assign t_coinc = (|hits[N/2-1:0]) && (|hits[N-1:N/2]);
  assign t_mult  = (pop >= {1'b0, mult_thr}) && t_or;

  always_comb begin
    case (mode)
      TO_COINC: t_next = t_coinc;
      TO_MULT:  t_next = t_mult;
      default:  t_next = t_or;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig_out <= 1'b0;
    else        trig_out <= t_next;
  end
endmodule
