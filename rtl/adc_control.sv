// adc_control: reads the Maroc2 track-and-hold outputs through the external
// ADC after a trigger and stores the result in the dual-port memory.
//
// A trigger (trig_start) that finds the logic idle, ADC readout enabled, room
// for a full event (66 words) in the memory and room in the descriptor FIFO
// starts a readout; any other trigger gets no ADC data (adc_drop pulses) but
// is still written to the hit FIFO. The hold level goes to the Maroc2
// hold_dly+2 cycles after trig_start. The time-stamp of the trigger word
// copied from the trigger logic is written as two words (bits 31:16, then
// 15:0). Then for each of the 64 channels: an R-clock steps the Maroc2 multiplexer (r_d = 1 on the first
// one selects channel 0), SETTLE_CYC cycles of settling follow (0.5 us
// needed, 32 cycles = 512 ns), and a convert clock starts the ADC. The ADC
// result, valid ADC_LAT cycles later, is written with its channel number as
// {ch[5:0], adc[11:0]}, unless suppression is on and the channel is not in
// the hit pattern. One channel takes SETTLE_CYC+1 cycles, the whole readout
// 64 x 33 = 2112 cycles (33.8 us). At the end the hold is released and
// {start address, word count} is pushed to the descriptor FIFO.
// The memory is used as a ring; rel_valid/rel_count give back the space of
// an event the link has read out.
// Conditional readout (box_cond = 1): the event is kept only if the trigger
// box answered (box_trig high) within ACC_WIN cycles of trig_start. Without
// that answer, the words are given back at the end of the readout, no
// descriptor is written and adc_discard pulses. The window of 32 cycles
// (512 ns) covers the trigger box's expected delay of under 500 ns.
// From the board description: hold after a software-set delay, 64 R-clocks
// and 64 convert clocks, time-stamp first then ADC value and channel number,
// write-enable conditioned by the hit bits, busy ADC drops data, address and
// word count to a separate FIFO, ADC data kept only on the trigger box's
// condition. This design's choices: R-port use, ADC latency, word layout,
// ring-buffer accounting, the acceptance window and discarding at the end of
// the conversion rather than holding the event back.
module adc_control
  import mc_pkg::*;
#(
  parameter int unsigned SETTLE_CYC = 32,
  parameter int unsigned ADC_LAT    = 4,
  parameter int unsigned AW         = 10,
  parameter int unsigned ACC_WIN    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adc_en,
  input  logic              adc_supp,
  input  logic [7:0]        hold_dly,
  input  logic              box_cond,    // keep events only on a trigger-box answer
  input  logic              box_trig,    // trigger-box output
  input  logic              trig_start,
  input  logic              ev_valid,
  input  trig_word_t        ev,
  // Maroc2 and ADC
  output logic              hold,
  output logic              r_clk,
  output logic              r_d,
  output logic              adc_conv,
  input  logic [ADC_W-1:0]  adc_data,
  // dual-port memory write side
  output logic              mem_we,
  output logic [AW-1:0]     mem_waddr,
  output logic [MEM_W-1:0]  mem_wdata,
  // descriptor FIFO
  input  logic              desc_full,
  output logic              desc_we,
  output logic [AW+6:0]     desc,        // {start address, word count}
  // space given back by the readout
  input  logic              rel_valid,
  input  logic [6:0]        rel_count,
  output logic              busy,
  output logic              adc_drop,
  output logic              adc_discard
);
  localparam int unsigned EV_MAX = N_CH + 2;
  localparam int unsigned DEPTH  = 1 << AW;
  localparam int unsigned PER    = SETTLE_CYC + 1;

  typedef enum logic [2:0] {S_IDLE, S_HDLY, S_TS_HI, S_TS_LO, S_CONV, S_DRAIN, S_DONE} state_e;
  state_e state;

  logic [7:0]       dly_cnt;
  logic [7:0]       ph;         // phase within one channel
  logic [CH_W:0]    ch;         // channel being converted (64 = finished)
  logic             have_ev;
  trig_word_t       ev_q;
  logic [AW-1:0]    base, wp;
  logic [6:0]       nwords;
  logic [AW:0]      free;
  logic [7:0]       lat_cnt;    // counts down to ADC data valid
  logic             lat_busy;
  logic [CH_W-1:0]  lat_ch;
  logic [7:0]       win_cnt;    // cycles left in the acceptance window
  logic             accepted;   // trigger box answered for this event
  logic             discard;

  assign discard = (state == S_DONE) && box_cond && !accepted;

  assign busy = (state != S_IDLE);

  // Ring-buffer free space.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) free <= (AW+1)'(DEPTH);
    else        free <= free - (AW+1)'(mem_we) + (rel_valid ? (AW+1)'(rel_count) : '0)
                        + (discard ? (AW+1)'(nwords) : '0);
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      dly_cnt  <= '0;
      ph       <= '0;
      ch       <= '0;
      have_ev  <= 1'b0;
      ev_q     <= '0;
      base     <= '0;
      wp       <= '0;
      nwords   <= '0;
      lat_cnt  <= '0;
      lat_busy <= 1'b0;
      lat_ch   <= '0;
      win_cnt  <= '0;
      accepted <= 1'b0;
      hold     <= 1'b0;
      r_clk    <= 1'b0;
      r_d      <= 1'b0;
      adc_conv <= 1'b0;
      mem_we   <= 1'b0;
      mem_waddr<= '0;
      mem_wdata<= '0;
      desc_we  <= 1'b0;
      desc     <= '0;
      adc_drop <= 1'b0;
      adc_discard <= 1'b0;
    end else begin
      r_clk    <= 1'b0;
      adc_conv <= 1'b0;
      mem_we   <= 1'b0;
      desc_we  <= 1'b0;
      adc_drop <= 1'b0;
      adc_discard <= 1'b0;

      // Acceptance window of the trigger box.
      if (win_cnt != 0) begin
        win_cnt <= win_cnt - 8'd1;
        if (box_trig) accepted <= 1'b1;
      end

      if (ev_valid && busy && !have_ev) begin
        ev_q    <= ev;
        have_ev <= 1'b1;
      end

      // ADC result pipeline: write ADC_LAT cycles after the convert clock.
      if (lat_busy) begin
        if (lat_cnt == 0) begin
          lat_busy <= 1'b0;
          if (!adc_supp || ev_q.hits[lat_ch]) begin
            mem_we    <= 1'b1;
            mem_waddr <= wp;
            mem_wdata <= {lat_ch, adc_data};
            wp        <= wp + 1'b1;
            nwords    <= nwords + 7'd1;
          end
        end else begin
          lat_cnt <= lat_cnt - 8'd1;
        end
      end

      case (state)
        S_IDLE: begin
          have_ev <= 1'b0;
          if (trig_start && adc_en) begin
            if (free >= (AW+1)'(EV_MAX) && !desc_full) begin
              state   <= S_HDLY;
              dly_cnt <= hold_dly;
              base    <= wp;
              nwords  <= '0;
              win_cnt <= 8'(ACC_WIN);
              accepted <= box_trig;
            end else begin
              adc_drop <= 1'b1;
            end
          end
        end
        S_HDLY: begin
          if (dly_cnt == 0) begin
            hold  <= 1'b1;
            state <= S_TS_HI;
          end else begin
            dly_cnt <= dly_cnt - 8'd1;
          end
        end
        S_TS_HI: begin
          if (have_ev) begin
            mem_we    <= 1'b1;
            mem_waddr <= wp;
            mem_wdata <= MEM_W'(ev_q.ts[31:16]);
            wp        <= wp + 1'b1;
            nwords    <= nwords + 7'd1;
            state     <= S_TS_LO;
          end
        end
        S_TS_LO: begin
          mem_we    <= 1'b1;
          mem_waddr <= wp;
          mem_wdata <= MEM_W'(ev_q.ts[15:0]);
          wp        <= wp + 1'b1;
          nwords    <= nwords + 7'd1;
          ch        <= '0;
          ph        <= '0;
          state     <= S_CONV;
        end
        S_CONV: begin
          ph <= ph + 8'd1;
          if (ph == 0) begin
            r_clk <= 1'b1;
            r_d   <= (ch == 0);
          end
          if (32'(ph) == PER - 1) begin
            adc_conv <= 1'b1;
            lat_busy <= 1'b1;
            lat_cnt  <= 8'(ADC_LAT - 1);
            lat_ch   <= ch[CH_W-1:0];
            ph       <= '0;
            ch       <= ch + 1'b1;
            if (32'(ch) == N_CH - 1) begin
              state <= S_DRAIN;
            end
          end
        end
        S_DRAIN: begin
          // Release the hold after the last convert; wait for its data.
          hold <= 1'b0;
          if (!lat_busy) state <= S_DONE;
        end
        default: begin  // S_DONE
          if (discard) begin
            wp          <= base;
            adc_discard <= 1'b1;
          end else begin
            desc_we <= 1'b1;
            desc    <= {base, nwords};
          end
          state   <= S_IDLE;
        end
      endcase

      if (trig_start && state != S_IDLE) adc_drop <= 1'b1;
    end
  end
endmodule
