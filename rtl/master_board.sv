// master_board: addressing, clocking and command of the channel memories.
//
// Memory steps come from the MEMORY SWEEP toggle (sweep_timer) or from the
// SIGNAL GENERATOR (internal divider or EXTERNAL CLOCK).  run_control accepts a
// step only while the tester runs.  An accepted step moves the memory counter
// (looping between the PROGRAM BOUNDS), counts the DELAY counter down when it
// is enabled, advances the pseudorandom generator and launches the delay line
// (strobe_sequencer), whose strobes become the channels' latch, write and
// compare timing through master_control.  The tester halts when the DELAY
// count runs out, on a data recognition with DELAY 000, or in BOARD TEST on
// any channel mismatch; a mismatch halt also clocks every glitch latch.
// Holding the DELAY toggle at SET reloads the DELAY count, clears its enable
// and overrides halts.  PROGRAM BOUNDS SET reloads bounds, address and DELAY
// count, but only while running.  One cycle after reset a power-up load takes
// the thumbwheel values.  Buttons and switches are synchronous levels.
// A memory step must come no sooner than SETTLE + CMP_DLY + 1 cycles after the
// previous one, or that step's compare never happens; an assertion checks
// this.  With the defaults the fastest generator setting leaves 20 cycles, and
// divider output 0 jumpered to the external clock input leaves 10.
module master_board
  import lbt_pkg::*;
#(
  parameter int unsigned N_CH     = 120,
  parameter int unsigned N_ACTIVE = N_CH,
  parameter int unsigned AW       = 10,
  parameter int unsigned SETTLE   = 2,
  parameter int unsigned CMP_DLY  = 6,
  parameter int unsigned OSC_DIV  = 5,
  parameter int unsigned HOLDOFF  = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // front panel
  input  logic [AW-1:0]   begin_sw,      // PROGRAM BOUNDS BEGIN thumbwheels (hex)
  input  logic [AW-1:0]   end_sw,        // PROGRAM BOUNDS END thumbwheels (hex)
  input  logic            bounds_set,
  input  logic [11:0]     delay_sw,      // DELAY thumbwheels (BCD)
  input  logic            delay_set,     // DELAY toggle up (held)
  input  logic            delay_count,   // DELAY toggle down
  input  logic            mem_up,
  input  logic            mem_dn,
  input  logic            chan_up,
  input  logic            chan_dn,
  input  logic [15:0]     sweep_rate,
  input  logic            gen_on,
  input  logic [2:0]      freq_sel,
  input  logic            ext_clk,
  input  logic            record_btn,
  input  logic            search_btn,
  input  logic            copy_btn,
  input  logic            write_btn,
  input  logic            input_btn,
  input  logic            output_btn,
  input  logic            enter_btn,
  input  logic            bit_sw,
  input  logic            trig_sw,
  input  logic            disp_sw,
  // from the channel boards
  input  logic            mismatch_any,
  input  logic            trig_any,
  input  logic            trig_miss,
  // to the channel boards
  output chan_ctrl_t      ctrl,
  output logic [AW-1:0]   addr,
  output logic [N_CH-1:0] cursor_sel,
  // status
  output logic [6:0]      cursor,
  output logic [11:0]     delay_cnt,
  output logic            led_delay,     // lit while DELAY countdown is disabled
  output logic            led_record,
  output logic            led_search,
  output logic            led_copy,
  output logic            led_write,
  output logic            led_board_test,
  output logic            running,
  output logic            recog_strobe,  // word recognition strobe out
  output logic [7:0]      sq_wave,       // divider outputs (square-wave sources)
  // events, for observation
  output logic            step_taken,
  output logic            fail_halt
);
  logic mem_pulse, mem_dir, chan_pulse, chan_dir, gen_step;
  logic step_req, step_up, step_ok, run, halted_by_fail;
  logic zero_halt, final_step, dly_en, recog, fail;
  logic seq_lat, seq_cmp, cmp_open, seq_kill, seq_busy;
  logic prng_q, prng_init, delay_start;
  logic por, bounds_d, bounds_r, dset_d, dset_r, bounds_load;
  flag_e flag;
  logic  bt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      por      <= 1'b1;
      bounds_d <= 1'b0;
      dset_d   <= 1'b0;
    end else begin
      por      <= 1'b0;
      bounds_d <= bounds_set;
      dset_d   <= delay_set;
    end
  end
  assign bounds_r    = bounds_set && !bounds_d;
  assign dset_r      = delay_set && !dset_d;
  assign bounds_load = por || (bounds_r && run);

  sweep_timer #(.HOLDOFF(HOLDOFF)) u_mem_sweep (
    .clk, .rst_n, .up_btn(mem_up), .dn_btn(mem_dn), .rate(sweep_rate),
    .pulse(mem_pulse), .dir(mem_dir)
  );
  sweep_timer #(.HOLDOFF(HOLDOFF)) u_chan_sweep (
    .clk, .rst_n, .up_btn(chan_up), .dn_btn(chan_dn), .rate(sweep_rate),
    .pulse(chan_pulse), .dir(chan_dir)
  );

  signal_generator #(.OSC_DIV(OSC_DIV)) u_gen (
    .clk, .rst_n, .on(gen_on), .sel(freq_sel), .ext_clk,
    .step(gen_step), .div(sq_wave)
  );

  assign step_req = mem_pulse || gen_step;
  assign step_up  = mem_pulse ? mem_dir : 1'b1;

  assign recog = cmp_open && trig_any && !trig_miss;
  assign fail  = bt && mismatch_any;

  run_control u_run (
    .clk, .rst_n, .halt_ovr(delay_set), .delay_halt(zero_halt), .fail,
    .step_req, .run, .step_ok, .halted_by_fail
  );

  memory_counter #(.AW(AW)) u_mc (
    .clk, .rst_n, .load(bounds_load), .begin_in(begin_sw), .end_in(end_sw),
    .step(step_ok), .up(step_up), .addr, .begin_q(), .end_q(), .at_end()
  );

  delay_counter u_dc (
    .clk, .rst_n, .bcd_in(delay_sw),
    .load(por || delay_set || bounds_load),
    .clear_en(por || delay_set),
    .set_en(delay_count || delay_start),
    .recog, .step(step_ok),
    .count(delay_cnt), .enabled(dly_en), .zero_halt, .final_step
  );

  assign seq_kill = dset_r || (step_ok && final_step) || (zero_halt && !delay_set);

  strobe_sequencer #(.SETTLE(SETTLE), .CMP_DLY(CMP_DLY)) u_seq (
    .clk, .rst_n, .start(step_ok && !final_step), .kill(seq_kill),
    .lat_stb(seq_lat), .cmp_stb(seq_cmp), .cmp_open, .busy(seq_busy)
  );

  prng u_prng (.clk, .rst_n, .init(prng_init), .step(step_ok), .q(prng_q));

  cursor_counter #(.N_CH(N_CH)) u_cur (
    .clk, .rst_n, .n_active(7'(N_ACTIVE)), .step(chan_pulse), .up(chan_dir),
    .ld(1'b0), .load_val(7'd0), .cnt(cursor), .sel(cursor_sel)
  );

  master_control u_ctl (
    .clk, .rst_n, .record_btn, .search_btn, .copy_btn, .write_btn, .input_btn,
    .output_btn, .enter_btn, .bit_sw, .trig_sw, .disp_sw, .prng_q,
    .step_ok, .step_manual(mem_pulse), .step_up, .seq_lat, .seq_cmp, .cmp_open,
    .ctrl, .flag, .bt, .prng_init, .delay_start
  );

  // A step may not overtake the delay line of the previous one.
  a_step_spacing: assert property (@(posedge clk) step_ok |-> !seq_busy)
    else $error("memory step arrived before the previous compare strobe");

  assign led_delay      = !dly_en;
  assign led_record     = (flag == F_RECORD) && !bt;
  assign led_search     = (flag == F_SEARCH);
  assign led_copy       = (flag == F_COPY);
  assign led_write      = (flag == F_WRITE);
  assign led_board_test = bt;
  assign running        = run;
  assign recog_strobe   = seq_cmp && trig_any && !trig_miss;
  assign step_taken     = step_ok;
  assign fail_halt      = halted_by_fail;
endmodule
