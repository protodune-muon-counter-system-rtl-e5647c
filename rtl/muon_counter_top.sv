// muon_counter_top: one readout chain of the muon counter: N_PMT PMT boards
// in a daisy chain, the USB readout board that closes the chain into a token
// ring, and the trigger box fed by the boards' trigger-out signals.
//
// Board 0 is the far end of the chain: it receives the words sent by the USB
// board, and each board passes its link output to the next; the last board
// sends back to the USB board, which hands data to the PC and sends the next
// token. The serializer/deserializer pair and the Cat5e cable between two
// boards are modelled as the 24-bit parallel word with its word clock.
// Boards 0..N_X-1 are taken as X-view boards and the rest as Y-view boards
// for the trigger box. Clock and sync/gate come from a common NIM fan-out,
// here shared ports. Each board gets back the trigger-box output of its own
// view (trig_x or trig_y) for conditional ADC readout. Board i answers to
// address i+1. The trigger box listens to a copy of the words the USB board
// sends into the chain and answers to address 0: the PC switches it between
// fan-in and trigger mode with a mode-register write to that address.
// Maroc2 chips and ADCs are outside the FPGAs: their signals are ports, one
// element per board. host_ovf (the USB board's queue to the PC) and
// ev_link_ovf (a board's input queue) flag a link word lost in a full queue.
module muon_counter_top
  import mc_pkg::*;
#(
  parameter int unsigned N_PMT       = 4,
  parameter int unsigned N_X         = 2,
  parameter int unsigned SYNC_PERIOD = 625_000_000,
  parameter int unsigned SETTLE_CYC  = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sync_gate,
  input  logic                 inhibit,
  // per-board Maroc2 / ADC signals
  input  logic [N_CH-1:0]      comp     [N_PMT],
  input  logic [ADC_W-1:0]     adc_data [N_PMT],
  output logic [N_PMT-1:0]     hold,
  output logic [N_PMT-1:0]     r_clk,
  output logic [N_PMT-1:0]     r_d,
  output logic [N_PMT-1:0]     adc_conv,
  output logic [N_PMT-1:0]     g_clk,
  output logic [N_PMT-1:0]     g_d,
  output logic [N_PMT-1:0]     g_load,
  output logic [N_PMT-1:0]     trig_out,
  // PC side of the USB board
  input  logic [PW-1:0]        host_cmd,
  input  logic                 host_cmd_valid,
  output logic                 host_cmd_ready,
  output link_word_t           host_rx,
  output logic                 host_rx_valid,
  input  logic                 host_rx_ready,
  output logic [31:0]          tokens,
  output logic                 host_ovf,
  // trigger box outputs
  output logic                 trig_x,
  output logic                 trig_y,
  output logic                 tbox_mode,
  // per-board event strobes, for monitoring
  output logic [N_PMT-1:0]     ev_trigger,
  output logic [N_PMT-1:0]     ev_sync,
  output logic [N_PMT-1:0]     ev_gate,
  output logic [N_PMT-1:0]     ev_veto,
  output logic [N_PMT-1:0]     ev_fifo_ovf,
  output logic [N_PMT-1:0]     ev_adc_drop,
  output logic [N_PMT-1:0]     ev_adc_discard,
  output logic [N_PMT-1:0]     ev_adc_done,
  output logic [N_PMT-1:0]     ev_tok_passed,
  output logic [N_PMT-1:0]     ev_tok_held,
  output logic [N_PMT-1:0]     ev_link_ovf
);
  link_word_t chain_w [N_PMT+1];
  logic       chain_c [N_PMT+1];

  usb_link_master u_usb (
    .clk, .rst_n, .host_cmd, .host_cmd_valid, .host_cmd_ready, .host_rx,
    .host_rx_valid, .host_rx_ready, .tx_word(chain_w[0]), .tx_wclk(chain_c[0]),
    .rx_word(chain_w[N_PMT]), .rx_wclk(chain_c[N_PMT]), .tokens, .rx_ovf(host_ovf));

  for (genvar i = 0; i < N_PMT; i++) begin : g_pmt
    pmt_board #(.SYNC_PERIOD(SYNC_PERIOD), .SETTLE_CYC(SETTLE_CYC)) u_pmt (
      .clk, .rst_n, .my_addr(ADDR_W'(i + 1)),
      .comp(comp[i]), .hold(hold[i]), .r_clk(r_clk[i]), .r_d(r_d[i]),
      .adc_conv(adc_conv[i]), .adc_data(adc_data[i]),
      .g_clk(g_clk[i]), .g_d(g_d[i]), .g_load(g_load[i]),
      .sync_gate, .inhibit, .trig_out(trig_out[i]),
      .box_trig(i < N_X ? trig_x : trig_y),
      .rx_word(chain_w[i]), .rx_wclk(chain_c[i]),
      .tx_word(chain_w[i+1]), .tx_wclk(chain_c[i+1]),
      .ev_trigger(ev_trigger[i]), .ev_sync(ev_sync[i]), .ev_gate(ev_gate[i]),
      .ev_veto(ev_veto[i]), .ev_fifo_ovf(ev_fifo_ovf[i]), .ev_adc_drop(ev_adc_drop[i]),
      .ev_adc_discard(ev_adc_discard[i]),
      .ev_adc_done(ev_adc_done[i]), .ev_tok_passed(ev_tok_passed[i]),
      .ev_tok_held(ev_tok_held[i]), .ev_link_ovf(ev_link_ovf[i]));
  end

  trigger_box #(.N_X(N_X), .N_Y(N_PMT - N_X)) u_tbox (
    .clk, .rst_n, .trig_in_x(trig_out[N_X-1:0]), .trig_in_y(trig_out[N_PMT-1:N_X]),
    .rx_word(chain_w[0]), .rx_wclk(chain_c[0]), .mode(tbox_mode), .trig_x, .trig_y);
endmodule
