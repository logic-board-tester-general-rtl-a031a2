// logic_board_tester: the complete tester, one master board and N_CH/10
// ten-channel boards (120 channels, 12 boards, 1024-word memories by default).
//
// The master board broadcasts one command bundle, the memory address and the
// cursor lines to every channel board; the boards return their comparator
// results, which are ORed (mismatch, trigger-marked, trigger miss) for the
// master.  Each channel has one I/O pin, presented as io_out / io_oe (drive)
// and io_in (the level actually on the pin, supplied from outside).  The front
// panel's switches, thumbwheels and LEDs are plain ports; mem_out carries every
// channel's RAM output (the data line read by a microcomputer).
module logic_board_tester
  import lbt_pkg::*;
#(
  parameter int unsigned N_CH     = 120,
  parameter int unsigned N_ACTIVE = N_CH,
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned AW       = $clog2(DEPTH),
  parameter int unsigned SETTLE   = 2,
  parameter int unsigned CMP_DLY  = 6,
  parameter int unsigned OSC_DIV  = 5,
  parameter int unsigned HOLDOFF  = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AW-1:0]       begin_sw,
  input  logic [AW-1:0]       end_sw,
  input  logic                bounds_set,
  input  logic [11:0]         delay_sw,
  input  logic                delay_set,
  input  logic                delay_count,
  input  logic                mem_up,
  input  logic                mem_dn,
  input  logic                chan_up,
  input  logic                chan_dn,
  input  logic [15:0]         sweep_rate,
  input  logic                gen_on,
  input  logic [2:0]          freq_sel,
  input  logic                ext_clk,
  input  logic                record_btn,
  input  logic                search_btn,
  input  logic                copy_btn,
  input  logic                write_btn,
  input  logic                input_btn,
  input  logic                output_btn,
  input  logic                enter_btn,
  input  logic                bit_sw,
  input  logic                trig_sw,
  input  logic                disp_sw,
  input  logic [N_CH-1:0]     io_in,
  output logic [N_CH-1:0]     io_out,
  output logic [N_CH-1:0]     io_oe,
  output logic [N_CH-1:0]     mem_out,
  output ch_led_t [N_CH-1:0]  ch_led,
  output logic [AW-1:0]       addr,
  output logic [6:0]          cursor,
  output logic [11:0]         delay_cnt,
  output logic                led_delay,
  output logic                led_record,
  output logic                led_search,
  output logic                led_copy,
  output logic                led_write,
  output logic                led_board_test,
  output logic                running,
  output logic                recog_strobe,
  output logic [7:0]          sq_wave,
  output logic                step_taken,
  output logic                fail_halt
);
  localparam int unsigned NB = N_CH / CH_PER_BOARD;

  chan_ctrl_t      ctrl;
  logic [N_CH-1:0] cursor_sel;
  logic [NB-1:0]   b_mm, b_ta, b_tm;

  initial assert (N_CH % CH_PER_BOARD == 0 && N_CH > 0)
    else $error("N_CH must be a multiple of %0d", CH_PER_BOARD);

  master_board #(
    .N_CH(N_CH), .N_ACTIVE(N_ACTIVE), .AW(AW), .SETTLE(SETTLE),
    .CMP_DLY(CMP_DLY), .OSC_DIV(OSC_DIV), .HOLDOFF(HOLDOFF)
  ) u_master (
    .clk, .rst_n, .begin_sw, .end_sw, .bounds_set, .delay_sw, .delay_set,
    .delay_count, .mem_up, .mem_dn, .chan_up, .chan_dn, .sweep_rate, .gen_on,
    .freq_sel, .ext_clk, .record_btn, .search_btn, .copy_btn, .write_btn,
    .input_btn, .output_btn, .enter_btn, .bit_sw, .trig_sw, .disp_sw,
    .mismatch_any (|b_mm),
    .trig_any     (|b_ta),
    .trig_miss    (|b_tm),
    .ctrl, .addr, .cursor_sel, .cursor, .delay_cnt, .led_delay, .led_record,
    .led_search, .led_copy, .led_write, .led_board_test, .running,
    .recog_strobe, .sq_wave, .step_taken, .fail_halt
  );

  for (genvar b = 0; b < NB; b++) begin : g_board
    localparam int unsigned LO = b * CH_PER_BOARD;
    channel_board #(.NCH(CH_PER_BOARD), .DEPTH(DEPTH), .AW(AW)) u_board (
      .clk, .rst_n, .ctrl,
      .glitch_clk   (fail_halt),
      .sel          (cursor_sel[LO +: CH_PER_BOARD]),
      .addr,
      .io_in        (io_in[LO +: CH_PER_BOARD]),
      .io_out       (io_out[LO +: CH_PER_BOARD]),
      .io_oe        (io_oe[LO +: CH_PER_BOARD]),
      .mem_out      (mem_out[LO +: CH_PER_BOARD]),
      .led          (ch_led[LO +: CH_PER_BOARD]),
      .mismatch_any (b_mm[b]),
      .trig_any     (b_ta[b]),
      .trig_miss    (b_tm[b])
    );
  end
endmodule
