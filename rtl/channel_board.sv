// channel_board: ten I/O channels and the board's comparator.
//
// The board comparator gathers every channel's mismatch line (any one set means
// a test failure) and every TRIGGER-marked channel's trigger result (the board
// matches when no marked channel disagrees with its BIT).  The master board
// combines the boards.  All outputs are combinational from the channels.
module channel_board
  import lbt_pkg::*;
#(
  parameter int unsigned NCH   = CH_PER_BOARD,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  chan_ctrl_t         ctrl,
  input  logic               glitch_clk,
  input  logic [NCH-1:0]     sel,
  input  logic [AW-1:0]      addr,
  input  logic [NCH-1:0]     io_in,
  output logic [NCH-1:0]     io_out,
  output logic [NCH-1:0]     io_oe,
  output logic [NCH-1:0]     mem_out,
  output ch_led_t [NCH-1:0]  led,
  output logic               mismatch_any,  // some compared channel disagrees
  output logic               trig_any,      // some channel is TRIGGER-marked
  output logic               trig_miss      // some marked channel does not match
);
  logic [NCH-1:0] mm, ten, thit;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [7:0] code_unused;
    chreg_t     creg_unused;
    io_channel #(.DEPTH(DEPTH), .AW(AW)) u_ch (
      .clk, .rst_n, .ctrl, .glitch_clk,
      .sel      (sel[c]),
      .addr,
      .io_in    (io_in[c]),
      .io_out   (io_out[c]),
      .io_oe    (io_oe[c]),
      .mismatch (mm[c]),
      .trig_en  (ten[c]),
      .trig_hit (thit[c]),
      .mem_out  (mem_out[c]),
      .cfr_code (code_unused),
      .creg     (creg_unused),
      .led      (led[c])
    );
  end

  assign mismatch_any = |mm;
  assign trig_any     = |ten;
  assign trig_miss    = |(ten & ~thit);
endmodule
