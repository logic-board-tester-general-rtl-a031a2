// tb_master_board: the master board alone, with the channel boards' comparator
// lines driven by the testbench: program-bounds loop under MEMORY SWEEP, steps
// from the signal generator, a DELAY countdown halt after N steps (address N
// words on, sweep dead, bounds set ignored), halt override, a search that halts
// on the address where the trigger matches with DELAY 000, and a BOARD TEST
// halt on a mismatch with its glitch clock.
module tb_master_board;
  import lbt_pkg::*;
  localparam int N = 20;
  logic clk = 0, rst_n = 0;
  logic [9:0] begin_sw = 10'd5, end_sw = 10'd9;
  logic bounds_set = 0, delay_set = 0, delay_count = 0;
  logic [11:0] delay_sw = 12'h010;
  logic mem_up = 0, mem_dn = 0, chan_up = 0, chan_dn = 0, gen_on = 0, ext_clk = 0;
  logic [15:0] sweep_rate = 16'd20;
  logic [2:0] freq_sel = 3'd1;
  logic record_btn = 0, search_btn = 0, copy_btn = 0, write_btn = 0, input_btn = 0;
  logic output_btn = 0, enter_btn = 0, bit_sw = 0, trig_sw = 0, disp_sw = 0;
  logic mismatch_any, trig_any = 0, trig_miss = 0;
  chan_ctrl_t ctrl;
  logic [9:0] addr;
  logic [N-1:0] cursor_sel;
  logic [6:0] cursor;
  logic [11:0] delay_cnt;
  logic led_delay, led_record, led_search, led_copy, led_write, led_board_test, running;
  logic recog_strobe, step_taken, fail_halt;
  logic [7:0] sq_wave;
  int checks = 0, failures = 0, steps = 0, fails = 0, recogs = 0;
  int bad_addr = -1;

  master_board #(.N_CH(N), .HOLDOFF(16)) dut (.*);

  // comparator model: a mismatch at bad_addr while the window is open
  assign mismatch_any = ctrl.cmp_en && (int'(addr) == bad_addr);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (step_taken) steps++;
    if (fail_halt) fails++;
    if (recog_strobe) recogs++;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s addr=%0d steps=%0d", s, addr, steps); end
  endtask
  task automatic press(ref logic b, input int n = 3);
    @(negedge clk); b = 1; repeat (n) @(negedge clk); b = 0; @(negedge clk);
  endtask

  initial begin
    int a0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    ck(addr == 5 && led_delay && running && led_record, "power-up");
    // sweep loop inside 5..9
    steps = 0;
    @(negedge clk); mem_up = 1;
    repeat (16 + 20 * 12 + 5) @(negedge clk);
    mem_up = 0; @(negedge clk);
    ck(steps >= 12 && addr == 10'(5 + (steps % 5)), $sformatf("sweep loop %0d", steps));
    // generator steps
    steps = 0; a0 = addr; gen_on = 1;
    repeat (400) @(negedge clk);
    gen_on = 0; repeat (20) @(negedge clk);
    ck(steps > 10 && addr == 10'(5 + ((a0 - 5 + steps) % 5)), "generator steps");
    // DELAY 10: write-string style countdown over a wide loop
    begin_sw = 10'd0; end_sw = 10'd1023;
    press(bounds_set);
    press(delay_set);
    press(delay_count);
    ck(!led_delay && addr == 0, "countdown enabled");
    steps = 0; gen_on = 1;
    repeat (1200) @(negedge clk);
    gen_on = 0; repeat (20) @(negedge clk);
    ck(!running && steps == 10 && addr == 10 && delay_cnt == 12'h000, "delay halt");
    press(mem_up); ck(steps == 10, "sweep dead after halt");
    begin_sw = 10'd100; press(bounds_set); ck(addr == 10, "bounds set ignored");
    // halt override
    press(delay_set); ck(running && led_delay, "override");
    begin_sw = 10'd0; press(bounds_set); ck(addr == 0, "bounds set works");
    // search: trigger matches only at address 7, DELAY 000
    search_btn = 1; @(negedge clk); search_btn = 0;
    ck(led_search, "search mode");
    delay_sw = 12'h000; press(delay_set);
    trig_any = 1;
    recogs = 0; gen_on = 1;
    for (int i = 0; i < 1200; i++) begin
      trig_miss = (addr != 7);
      @(negedge clk);
    end
    gen_on = 0; trig_any = 0; trig_miss = 0;
    ck(!running && addr == 7 && recogs >= 1, "search halt at 7");
    press(delay_set);
    // board test: mismatch at address 12 halts there and clocks the glitch latches
    delay_sw = 12'h999; press(delay_set);
    press(input_btn); ck(led_board_test, "board test");
    bad_addr = 12; fails = 0; gen_on = 1;
    repeat (1200) @(negedge clk);
    gen_on = 0;
    ck(!running && addr == 12 && fails == 1, "board test halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
