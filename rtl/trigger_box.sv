// trigger_box: fan-in of the PMT boards' trigger-out signals into the two
// triggers sent to the experiment's trigger board, with its operating mode
// set remotely over the readout link.
//
// The N_X trigger-outs of the X-view boards and the N_Y of the Y-view boards
// are synchronised (two flip-flops) and OR-ed per view. In fan-in mode
// (mode = 0, the reset state) trig_x is the OR of the X boards and trig_y
// the OR of the Y boards. In trigger mode (mode = 1) both outputs fire only
// on an X-Y coincidence. Outputs are registered; latency is 3 cycles (48 ns),
// well inside the 500 ns allowed.
// Remote operation: the box listens to a copy of the link words the USB
// board sends into the chain (rx_word/rx_wclk, through link_rx). A control
// word with board address BOX_ADDR and register R_MODE sets mode to bit 0 of
// its data byte; every other word is ignored. The new mode applies 4 to 5
// cycles after the word clock edge.
// The two OR outputs and the fan-in or trigger operation chosen by a command
// from the DAQ follow the description; the coincidence rule of trigger mode,
// the box address and the way the command reaches the box are this design's
// choices.
module trigger_box
  import mc_pkg::*;
#(
  parameter int unsigned       N_X      = 2,
  parameter int unsigned       N_Y      = 2,
  parameter logic [ADDR_W-1:0] BOX_ADDR = '0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N_X-1:0] trig_in_x,
  input  logic [N_Y-1:0] trig_in_y,
  // copy of the link words sent by the USB board
  input  link_word_t     rx_word,
  input  logic           rx_wclk,
  output logic           mode,
  output logic           trig_x,
  output logic           trig_y
);
  logic [N_X-1:0] x1, x2;
  logic [N_Y-1:0] y1, y2;
  logic           ox, oy;
  link_word_t     cmd;
  logic           cmd_valid;
  ctrl_payload_t  cp;

  link_rx u_rx (.clk, .rst_n, .rx_word, .rx_wclk, .word(cmd), .valid(cmd_valid));

  assign cp = ctrl_payload_t'(cmd.payload);
  assign ox = |x2;
  assign oy = |y2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= 1'b0;
    end else if (cmd_valid && cmd.wtype == W_CTRL && cp.addr == BOX_ADDR
                 && cp.reg_no == R_MODE) begin
      mode <= cp.data[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {x1, x2, y1, y2} <= '0;
      trig_x <= 1'b0;
      trig_y <= 1'b0;
    end else begin
      x1 <= trig_in_x;
      x2 <= x1;
      y1 <= trig_in_y;
      y2 <= y1;
      trig_x <= mode ? (ox && oy) : ox;
      trig_y <= mode ? (ox && oy) : oy;
    end
  end
endmodule
