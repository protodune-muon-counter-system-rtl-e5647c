// gate_sync_disc: splits the shared NIM input of a PMT board into a sync
// strobe and a gate level by the width of the pulse.
//
// The pulse is brought into the 62.5 MHz clock domain by two flip-flops and
// its width counted in clock cycles. A pulse seen for at most SYNC_MAX cycles
// (16 ns at SYNC_MAX = 1) gives a one-cycle sync_pulse when it ends. A pulse
// seen for GATE_MIN cycles or more (longer than two cycles, 32 ns) raises
// gate from its GATE_MIN-th cycle until it falls. Widths in between produce
// nothing. The two width classes follow the board description; the two-flop
// synchroniser and the exact cycle counts are this design's choice.
// Latency: sync_pulse comes 3 cycles after the pulse's last sampled cycle.
module gate_sync_disc #(
  parameter int unsigned SYNC_MAX = 1,
  parameter int unsigned GATE_MIN = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sync_gate,
  output logic sync_pulse,
  output logic gate
);
  logic s1, s2, s3;
  logic [3:0] width;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1, s2, s3} <= '0;
      width        <= '0;
      sync_pulse   <= 1'b0;
      gate         <= 1'b0;
    end else begin
      s1 <= sync_gate;
      s2 <= s1;
      s3 <= s2;
      sync_pulse <= 1'b0;
      if (s2) begin
        if (width != 4'hF) width <= width + 4'd1;
        if (32'(width) + 1 >= GATE_MIN) gate <= 1'b1;
      end else begin
        gate  <= 1'b0;
        width <= '0;
        if (s3 && width != 0 && 32'(width) <= SYNC_MAX) sync_pulse <= 1'b1;
      end
    end
  end
endmodule
