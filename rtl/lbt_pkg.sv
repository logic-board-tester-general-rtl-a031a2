// lbt_pkg: types and constants shared by the logic board tester.
//
// The tester has 120 I/O channels, each with a 1024 x 1 memory, grouped ten to a
// channel board, and one master board that addresses the memories and commands
// the channels.  The master board drives every channel with the same control
// bundle (chan_ctrl_t).  Each channel forms a 5-bit address for its channel
// function ROM (CFR) from three master bits and two bits of its own channel
// register; the ROM's 8-bit word names what the channel does.  The ROM words
// below are the original PROM contents; what each bit of a word switches on the
// channel board is not known, so channels decode whole words (see io_channel).
package lbt_pkg;

  localparam int unsigned CH_PER_BOARD = 10;

  // Channel register: BIT, TRIGGER, INPUT and OUTPUT.
  typedef struct packed {
    logic bit_v;
    logic trig;
    logic inp;
    logic outp;
  } chreg_t;

  // Master register flags (one of them is held at a time).
  typedef enum logic [1:0] {
    F_RECORD = 2'd0,
    F_SEARCH = 2'd1,
    F_COPY   = 2'd2,
    F_WRITE  = 2'd3
  } flag_e;

  // Channel function ROM words, as programmed.
  localparam logic [7:0] CFR_RECORD  = 8'h96;  // address 0
  localparam logic [7:0] CFR_SEARCH  = 8'hCD;  // address 2 (search / copy idle)
  localparam logic [7:0] CFR_COPY    = 8'hA8;  // address 3 (copy active)
  localparam logic [7:0] CFR_IDLE    = 8'hE8;  // address 6 (write idle / memory to tape)
  localparam logic [7:0] CFR_OUTPUT  = 8'h7A;  // address 8
  localparam logic [7:0] CFR_WRITE   = 8'h8C;  // addresses A and 16
  localparam logic [7:0] CFR_INHIBIT = 8'h50;  // addresses E and 12
  localparam logic [7:0] CFR_INPUT   = 8'hFA;  // address 10
  localparam logic [7:0] CFR_NONE    = 8'h00;  // unprogrammed

  // Source written into the channel RAM.
  typedef enum logic [1:0] {
    WR_NONE  = 2'd0,
    WR_IO    = 2'd1,  // recorder: the I/O line
    WR_LATCH = 2'd2,  // copy: the memory latch
    WR_EDIT  = 2'd3   // edit: BIT line, or a 1 for a scratchpad assignment
  } wr_src_e;

  // Data compared against the channel's BIT for trigger / search.
  typedef enum logic [1:0] {
    TRG_NONE = 2'd0,
    TRG_IO   = 2'd1,
    TRG_MEM  = 2'd2
  } trg_src_e;

  // Broadcast from the master board to every channel.
  typedef struct packed {
    logic [2:0] cfr_a;      // CFR address bits 2..0 (bit0 copy held, bit1 copy/search/write, bit2 write)
    logic       lat_stb;    // memory latch clock
    logic       wr_stb;     // RAM write strobe
    logic       cmp_en;     // compare window open (comparator strobe)
    logic       edit_bit;   // BIT line: BIT switch OR (TRIGGER switch AND random bit)
    logic       edit_trig;  // TRIGGER switch
    logic       enter;      // ENTER stroke for the cursor channel
    logic       set_in;     // INPUT button stroke for the cursor channel
    logic       set_out;    // OUTPUT button stroke for the cursor channel
    logic       j_set;      // WRITE pressed: cursor channel joins the write
    logic       j_clr;      // WRITE released
    logic       clr_all;    // RECORD: clear every channel register
    logic       disp_sel;   // 0: BIT/TRIGGER/MEMORY, 1: INPUT/OUTPUT/GLITCH
  } chan_ctrl_t;

  // Four LEDs of one channel column.
  typedef struct packed {
    logic cur;
    logic l1;
    logic l2;
    logic l3;
  } ch_led_t;

endpackage
