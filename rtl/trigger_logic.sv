// trigger_logic: forms the board trigger from the synchronised discriminator
// bits and writes one 96-bit trigger word per trigger.
//
// In IDLE the OR of the 64 synchronised bits starts a trigger: the current
// time-stamp is kept (so it belongs to the earliest input) and trig_start
// pulses for the ADC logic. Bits that arrive during the trigger time of
// TRIG_WIN cycles (4 x 16 ns) are OR-ed into the pattern. On the last cycle
// of the window ev_valid pulses with {time-stamp, pattern}: this goes to the
// hit FIFO (written in one cycle, so the FIFO adds no dead-time) and as a copy
// to the ADC logic. The discriminators are then held cleared for DEAD_CYC
// cycles (80 ns) through disc_clr. These numbers and the sequence follow the
// board description.
// This design's choices: a trigger is refused (the discriminators are cleared
// without a word) while inhibit is high, or in gated mode while the gate is
// low; a word that finds the FIFO full is dropped and fifo_ovf pulses.
// disc_clr is a flip-flop output. Reset leaves the logic in the dead-time
// state, so disc_clr rises just after reset and clears the discriminators.
module trigger_logic
  import mc_pkg::*;
#(
  parameter int unsigned TRIG_WIN = 4,
  parameter int unsigned DEAD_CYC = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] hits,
  input  logic [TS_W-1:0] ts,
  input  logic            gate_mode,
  input  logic            gate,
  input  logic            inhibit,
  input  logic            fifo_full,
  output logic            trig_start,
  output logic            ev_valid,
  output trig_word_t      ev,
  output logic            fifo_we,
  output logic            fifo_ovf,
  output logic            vetoed,
  output logic            disc_clr
);
  typedef enum logic [1:0] {S_IDLE, S_WIN, S_DEAD} state_e;
  state_e          state;
  logic [7:0]      cnt;
  logic [N_CH-1:0] acc;
  logic [TS_W-1:0] ts_q;
  logic            any_hit, allowed;

  assign any_hit = |hits;
  assign allowed = !inhibit && (!gate_mode || gate);
  assign ev.ts   = ts_q;
  assign ev.hits = acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_DEAD;
      cnt        <= '0;
      acc        <= '0;
      ts_q       <= '0;
      trig_start <= 1'b0;
      ev_valid   <= 1'b0;
      fifo_we    <= 1'b0;
      fifo_ovf   <= 1'b0;
      vetoed     <= 1'b0;
      disc_clr   <= 1'b0;
    end else begin
      trig_start <= 1'b0;
      ev_valid   <= 1'b0;
      fifo_we    <= 1'b0;
      fifo_ovf   <= 1'b0;
      vetoed     <= 1'b0;
      case (state)
        S_IDLE: begin
          disc_clr <= 1'b0;
          if (any_hit) begin
            if (allowed) begin
              ts_q       <= ts;
              acc        <= hits;
              trig_start <= 1'b1;
              cnt        <= 8'd1;
              state      <= S_WIN;
            end else begin
              vetoed   <= 1'b1;
              disc_clr <= 1'b1;
              cnt      <= '0;
              state    <= S_DEAD;
            end
          end
        end
        S_WIN: begin
          acc <= acc | hits;
          cnt <= cnt + 8'd1;
          if (32'(cnt) == TRIG_WIN - 1) begin
            ev_valid <= 1'b1;
            fifo_we  <= !fifo_full;
            fifo_ovf <= fifo_full;
            disc_clr <= 1'b1;
            cnt      <= '0;
            state    <= S_DEAD;
          end
        end
        default: begin  // S_DEAD
          cnt      <= cnt + 8'd1;
          disc_clr <= 1'b1;
          if (32'(cnt) == DEAD_CYC - 1) begin
            disc_clr <= 1'b0;
            state    <= S_IDLE;
          end
        end
      endcase
    end
  end
endmodule
