// pmt_board: the FPGA logic of one PMT board of the muon counter.
//
// Data path: the 64 Maroc2 comparator outputs set the discriminator
// flip-flops (disc_latch); their synchronised OR starts a trigger
// (trigger_logic), which writes {time-stamp, hit pattern} as one 96-bit word
// into the hit-pattern FIFO and hands a copy to the ADC logic (adc_control).
// The ADC logic holds the Maroc2 track-holds, digitises the 64 channels
// through the external ADC and stores the event in a dual-port memory, with
// {address, word count} in a descriptor FIFO. The link node (token_node)
// empties both buffers when the readout token reaches this board and passes
// everything else along the chain at one 24-bit word per 8 clocks.
// Timing: the shared NIM input is split into sync (clears the 32-bit
// time-stamp) and gate (gate_sync_disc, timestamp_counter).
// Control: registers (ctrl_regs) written over the link set the acquisition
// modes and the Maroc2 set-up, which maroc_gport shifts into the chip.
// trig_out is the hardware trigger-out (trigout_logic); box_trig is the
// trigger box's answer, which in conditional mode decides whether an event's
// ADC data is kept. All blocks run on the
// 62.5 MHz system clock; the comparators and the link word clock are
// asynchronous inputs synchronised inside. Board address my_addr comes from
// the address switches.
module pmt_board
  import mc_pkg::*;
#(
  parameter int unsigned SYNC_PERIOD = 625_000_000,
  parameter int unsigned SETTLE_CYC  = 32,
  parameter int unsigned HF_DEPTH    = 64,
  parameter int unsigned AW          = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ADDR_W-1:0]  my_addr,
  // Maroc2 and external ADC
  input  logic [N_CH-1:0]    comp,
  output logic               hold,
  output logic               r_clk,
  output logic               r_d,
  output logic               adc_conv,
  input  logic [ADC_W-1:0]   adc_data,
  output logic               g_clk,
  output logic               g_d,
  output logic               g_load,
  // NIM timing inputs and trigger-out
  input  logic               sync_gate,
  input  logic               inhibit,
  output logic               trig_out,
  input  logic               box_trig,
  // link: from downstream board, to upstream board
  input  link_word_t         rx_word,
  input  logic               rx_wclk,
  output link_word_t         tx_word,
  output logic               tx_wclk,
  // event strobes, for monitoring
  output logic               ev_trigger,
  output logic               ev_sync,
  output logic               ev_gate,
  output logic               ev_veto,
  output logic               ev_fifo_ovf,
  output logic               ev_adc_drop,
  output logic               ev_adc_discard,
  output logic               ev_adc_done,
  output logic               ev_tok_passed,
  output logic               ev_tok_held,
  output logic               ev_link_ovf
);
  logic            sync_pulse, gate, sync_err;
  logic [TS_W-1:0] ts;
  logic [N_CH-1:0] hits;
  logic            disc_clr, trig_start, ev_valid, hf_we, fifo_ovf, vetoed;
  trig_word_t      ev, hf_dout;
  logic            hf_empty, hf_full, hf_rd;
  logic            mem_we;
  logic [AW-1:0]   mem_waddr, mem_raddr;
  logic [MEM_W-1:0] mem_wdata, mem_rdata;
  logic            desc_we, df_empty, df_full, df_rd;
  logic [AW+6:0]   desc, df_dout;
  logic            rel_valid, adc_busy, adc_drop;
  logic [6:0]      rel_count;
  link_word_t      in_word, out_word;
  logic            in_valid, out_valid, out_ready;
  logic            reg_we, gload, g_busy;
  logic [6:0]      reg_waddr, reg_raddr;
  logic [7:0]      reg_wdata, reg_rdata;
  logic [7:0]      maroc [N_MAROC];
  cfg_t            cfg;

  gate_sync_disc u_gsd (.clk, .rst_n, .sync_gate, .sync_pulse, .gate);

  timestamp_counter #(.W(TS_W), .SYNC_PERIOD(SYNC_PERIOD)) u_ts (
    .clk, .rst_n, .sync_pulse, .chk_en(cfg.sync_chk), .ts, .sync_err);

  disc_latch #(.N_CH(N_CH)) u_disc (.clk, .comp, .clr(disc_clr), .hits);

  trigger_logic u_trig (
    .clk, .rst_n, .hits, .ts, .gate_mode(cfg.gate_mode), .gate, .inhibit,
    .fifo_full(hf_full), .trig_start, .ev_valid, .ev, .fifo_we(hf_we),
    .fifo_ovf, .vetoed, .disc_clr);

  trigout_logic #(.N(N_CH)) u_tout (
    .clk, .rst_n, .hits, .mode(cfg.trigout_mode), .mult_thr(cfg.mult_thr), .trig_out);

  sync_fifo #(.W($bits(trig_word_t)), .DEPTH(HF_DEPTH)) u_hit_fifo (
    .clk, .rst_n, .wr_en(hf_we), .din(ev), .rd_en(hf_rd), .dout(hf_dout),
    .empty(hf_empty), .full(hf_full), .count());

  adc_control #(.SETTLE_CYC(SETTLE_CYC), .AW(AW)) u_adc (
    .clk, .rst_n, .adc_en(cfg.adc_en), .adc_supp(cfg.adc_supp), .hold_dly(cfg.hold_dly),
    .box_cond(cfg.box_cond), .box_trig,
    .trig_start, .ev_valid, .ev, .hold, .r_clk, .r_d, .adc_conv, .adc_data,
    .mem_we, .mem_waddr, .mem_wdata, .desc_full(df_full), .desc_we, .desc,
    .rel_valid, .rel_count, .busy(adc_busy), .adc_drop,
    .adc_discard(ev_adc_discard));

  dp_ram #(.W(MEM_W), .DEPTH(1 << AW)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(mem_raddr),
    .rdata(mem_rdata));

  sync_fifo #(.W(AW + 7), .DEPTH(16)) u_desc_fifo (
    .clk, .rst_n, .wr_en(desc_we), .din(desc), .rd_en(df_rd), .dout(df_dout),
    .empty(df_empty), .full(df_full), .count());

  link_rx u_rx (.clk, .rst_n, .rx_word, .rx_wclk, .word(in_word), .valid(in_valid));

  token_node #(.AW(AW)) u_node (
    .clk, .rst_n, .my_addr, .in_word, .in_valid, .out_word, .out_valid, .out_ready,
    .hf_empty, .hf_dout, .hf_rd, .df_empty, .df_dout, .df_rd, .mem_raddr, .mem_rdata,
    .rel_valid, .rel_count, .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .tok_passed(ev_tok_passed), .tok_held(ev_tok_held), .in_ovf(ev_link_ovf));

  link_tx u_tx (.clk, .rst_n, .word(out_word), .valid(out_valid), .ready(out_ready),
                .tx_word, .tx_wclk);

  ctrl_regs u_regs (
    .clk, .rst_n, .we(reg_we), .waddr(reg_waddr), .wdata(reg_wdata), .raddr(reg_raddr),
    .rdata(reg_rdata), .ev_sync_err(sync_err), .ev_fifo_ovf(fifo_ovf),
    .ev_adc_drop(adc_drop), .maroc, .gload, .cfg);

  maroc_gport #(.N_BYTES(N_MAROC)) u_gport (
    .clk, .rst_n, .start(gload), .bytes(maroc), .g_clk, .g_d, .g_load, .busy(g_busy));

  assign ev_trigger  = ev_valid;
  assign ev_sync     = sync_pulse;
  assign ev_gate     = gate;
  assign ev_veto     = vetoed;
  assign ev_fifo_ovf = fifo_ovf;
  assign ev_adc_drop = adc_drop;
  assign ev_adc_done = desc_we;
endmodule
