// timestamp_counter: the 32-bit, 16 ns per count time-stamp of a PMT board.
//
// The counter advances on every 62.5 MHz clock and is cleared by the sync
// strobe, which keeps all boards of all chains on the same count. The sync
// arrives at a known fixed period, so when chk_en is set the count reached at
// each sync is compared with SYNC_PERIOD-1 (the first sync after reset only
// aligns the counter); a mismatch gives a one-cycle sync_err. The clearing by
// sync follows the board description; the form of the period check and the
// default period of 10 s (0.1 Hz) are this design's reading of the timing
// system's sync rate. ts is registered; it reads 0 on the cycle after a sync.
module timestamp_counter #(
  parameter int unsigned W           = 32,
  parameter int unsigned SYNC_PERIOD = 625_000_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sync_pulse,
  input  logic         chk_en,
  output logic [W-1:0] ts,
  output logic         sync_err
);
  logic seen_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts        <= '0;
      seen_sync <= 1'b0;
      sync_err  <= 1'b0;
    end else begin
      sync_err <= 1'b0;
      if (sync_pulse) begin
        ts        <= '0;
        seen_sync <= 1'b1;
        if (chk_en && seen_sync && ts != W'(SYNC_PERIOD - 1)) sync_err <= 1'b1;
      end else begin
        ts <= ts + 1'b1;
      end
    end
  end
endmodule
