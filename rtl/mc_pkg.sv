// mc_pkg: types and constants shared by the muon-counter readout logic.
//
// The readout link carries 24-bit words whose two top bits give the word
// type: 1 = control, 2 = token, 3 = data. Type 0 is used here as the idle
// word sent when a link has nothing to carry (this design's choice). The
// 22-bit payload of a data word begins each event packet with a header that
// names the packet kind, the 7-bit board address and the number of words that
// follow; control words carry board address, register number and one byte.
// The 96-bit trigger word (32-bit time-stamp, 64 hit bits), the link word
// types and the 7-bit address follow the readout description; the packet and
// control-word layouts and the register map are this design's own.
package mc_pkg;

  localparam int unsigned N_CH    = 64;   // Maroc2 channels per board
  localparam int unsigned TS_W    = 32;   // time-stamp width, 16 ns per bit
  localparam int unsigned LW      = 24;   // link word width
  localparam int unsigned PW      = 22;   // link payload width
  localparam int unsigned ADC_W   = 12;   // external ADC resolution
  localparam int unsigned CH_W    = 6;    // channel number width
  localparam int unsigned ADDR_W  = 7;    // switch-settable board address
  localparam int unsigned MEM_W   = CH_W + ADC_W;  // ADC memory word (18 bit)
  localparam int unsigned N_MAROC = 70;   // Maroc2 set-up bytes: 3 switch, 3 DAC, 64 gain

  typedef enum logic [1:0] {
    W_IDLE  = 2'd0,
    W_CTRL  = 2'd1,
    W_TOKEN = 2'd2,
    W_DATA  = 2'd3
  } word_type_e;

  // Sub-type in payload[21:20] of a data word.
  typedef enum logic [1:0] {
    SUB_BODY     = 2'd0,
    SUB_TRIG_HDR = 2'd1,
    SUB_ADC_HDR  = 2'd2
  } sub_type_e;

  typedef struct packed {
    word_type_e      wtype;
    logic [PW-1:0]   payload;
  } link_word_t;

  // One trigger: written as a single 96-bit FIFO word.
  typedef struct packed {
    logic [TS_W-1:0] ts;
    logic [N_CH-1:0] hits;
  } trig_word_t;

  // Control word payload: address, register, byte.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [6:0]        reg_no;
    logic [7:0]        data;
  } ctrl_payload_t;

  // Register map (byte registers).
  localparam logic [6:0] R_MAROC_LAST = 7'd69;  // 0..69: Maroc2 set-up bytes
  localparam logic [6:0] R_GLOAD      = 7'h46;  // write: shift set-up into G port
  localparam logic [6:0] R_MODE       = 7'h48;  // acquisition / trigger-out mode
  localparam logic [6:0] R_HOLD_DLY   = 7'h49;  // hold delay, clock cycles
  localparam logic [6:0] R_MULT       = 7'h4A;  // trigger-out multiplicity
  localparam logic [6:0] R_SYNC_ERR   = 7'h4B;  // read: sync errors (saturating)
  localparam logic [6:0] R_FIFO_OVF   = 7'h4C;  // read: hit-FIFO overflows
  localparam logic [6:0] R_ADC_DROP   = 7'h4D;  // read: triggers without ADC data
  localparam logic [6:0] R_READ_REQ   = 7'h7F;  // control word asking for a read-back
  localparam logic [6:0] R_READ_REPLY = 7'h7E;  // register number of the reply word

  typedef enum logic [1:0] {
    TO_OR   = 2'd0,   // OR of the 64 channels
    TO_COINC = 2'd1,  // hit in channels 0-31 and in channels 32-63
    TO_MULT = 2'd2    // at least mult_thr channels hit
  } trigout_mode_e;

  typedef struct packed {
    logic          adc_en;       // read out ADC data (0: latch-only data)
    logic          adc_supp;     // keep only channels in the hit pattern
    logic          gate_mode;    // accept triggers only while the gate is high
    trigout_mode_e trigout_mode;
    logic          sync_chk;     // check the sync period
    logic          box_cond;     // keep ADC data only when the trigger box answers
    logic [7:0]    hold_dly;
    logic [6:0]    mult_thr;
  } cfg_t;

  function automatic link_word_t mk_word(word_type_e t, logic [PW-1:0] p);
    link_word_t w;
    w.wtype   = t;
    w.payload = p;
    return w;
  endfunction

  function automatic logic [PW-1:0] mk_hdr(sub_type_e s, logic [ADDR_W-1:0] a,
                                           logic [12:0] n);
    return {s, a, n};
  endfunction

endpackage
