// ctrl_regs: the byte registers of a PMT board, written and read over the
// readout link.
//
// Registers 0..69 hold the Maroc2 set-up: 3 bytes of switch settings, 3
// bytes of DAC value and 64 gain bytes, in the order they are shifted into
// the chip's G port. Writing register 0x46 starts that shift (gload pulses).
// 0x48 is the mode register: bit 0 ADC readout on, bit 1 suppress channels
// not hit, bit 2 gated mode, bits 4:3 trigger-out mode, bit 5 sync-period
// check, bit 6 keep ADC data only when the trigger box answers. 0x49 is the hold delay in clock cycles, 0x4A the trigger-out
// multiplicity. 0x4B, 0x4C and 0x4D read saturating counts of sync errors,
// hit-FIFO overflows and triggers without ADC data. Reads are combinational
// on raddr. The 70 set-up bytes and the fact that parameters go over the
// link follow the board description; the map and the reset values (gain 16,
// ADC on with suppression, OR trigger-out, hold delay 1) are this design's.
module ctrl_regs
  import mc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [6:0]  waddr,
  input  logic [7:0]  wdata,
  input  logic [6:0]  raddr,
  output logic [7:0]  rdata,
  input  logic        ev_sync_err,
  input  logic        ev_fifo_ovf,
  input  logic        ev_adc_drop,
  output logic [7:0]  maroc [N_MAROC],
  output logic        gload,
  output cfg_t        cfg
);
  logic [7:0] mode_q, hold_q, mult_q, n_sync_err, n_fifo_ovf, n_adc_drop;

  assign cfg.adc_en       = mode_q[0];
  assign cfg.adc_supp     = mode_q[1];
  assign cfg.gate_mode    = mode_q[2];
  assign cfg.trigout_mode = trigout_mode_e'(mode_q[4:3]);
  assign cfg.sync_chk     = mode_q[5];
  assign cfg.box_cond     = mode_q[6];
  assign cfg.hold_dly     = hold_q;
  assign cfg.mult_thr     = mult_q[6:0];

  function automatic logic [7:0] sat_inc(logic [7:0] v, logic e);
    return (e && v != 8'hFF) ? v + 8'd1 : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_MAROC); i++) maroc[i] <= (i >= 6) ? 8'd16 : 8'd0;
      mode_q     <= 8'h03;
      hold_q     <= 8'd1;
      mult_q     <= 8'd2;
      gload      <= 1'b0;
      n_sync_err <= '0;
      n_fifo_ovf <= '0;
      n_adc_drop <= '0;
    end else begin
      gload      <= 1'b0;
      n_sync_err <= sat_inc(n_sync_err, ev_sync_err);
      n_fifo_ovf <= sat_inc(n_fifo_ovf, ev_fifo_ovf);
      n_adc_drop <= sat_inc(n_adc_drop, ev_adc_drop);
      if (we) begin
        if (waddr <= R_MAROC_LAST) maroc[waddr] <= wdata;
        else begin
          case (waddr)
            R_GLOAD:    gload  <= 1'b1;
            R_MODE:     mode_q <= wdata;
            R_HOLD_DLY: hold_q <= wdata;
            R_MULT:     mult_q <= wdata;
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    if (raddr <= R_MAROC_LAST) rdata = maroc[raddr];
    else begin
      case (raddr)
        R_MODE:     rdata = mode_q;
        R_HOLD_DLY: rdata = hold_q;
        R_MULT:     rdata = mult_q;
        R_SYNC_ERR: rdata = n_sync_err;
        R_FIFO_OVF: rdata = n_fifo_ovf;
        R_ADC_DROP: rdata = n_adc_drop;
        default:    rdata = 8'h00;
      endcase
    end
  end
endmodule
