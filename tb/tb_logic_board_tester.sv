// tb_logic_board_tester: the whole tester at its default size (120 channels,
// 1024-word memories), operated from its front-panel ports the way an operator
// would, against a small board-under-test model: channel 2 sees A AND B,
// channel 3 A XOR B of the stimulus on channels 0 and 1, the other pins carry a
// fixed pseudorandom pattern per address.  The memory model starts from a
// read-out of the power-up contents and follows every operation.
//   1. a string of 1s written with WRITE + DELAY (length, stop address)
//   2. a pseudorandom string (after 32 run-out steps; checked by its recurrence)
//   3. COPY of a word to another address
//   4. RECORD of the seven square waves T0 .. 64 T0 with the tester clocked
//      from the lowest divider output through the EXTERNAL CLOCK input
//   5. BOARD TEST: pseudorandom stimulus strings, OUTPUT channels with scratchpad marks, a program pass that
//      records the responses, INPUT channels with scratchpad marks, a passing
//      test, a stuck fault, a one-cycle glitch, the halt override, a reverse
//      sweep that executes nothing
//   6. SEARCH MEMORY for a 10-bit word with DELAY 000
//   7. RECORD with a trigger word and 5 words of post-trigger delay
// Each mechanism is counted; one that never happened counts as a failure.
module tb_logic_board_tester;
  import lbt_pkg::*;
  localparam int N = 120, DEPTH = 1024, AW = 10;
  localparam int LOOP_END = DEPTH - 3, S_OUT = DEPTH - 2, S_IN = DEPTH - 1;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] begin_sw = '0, end_sw = AW'(DEPTH - 1);
  logic bounds_set = 0, delay_set = 0, delay_count = 0;
  logic [11:0] delay_sw = 12'h000;
  logic mem_up = 0, mem_dn = 0, chan_up = 0, chan_dn = 0, gen_on = 0, ext_clk;
  logic [15:0] sweep_rate = 16'd40;
  logic [2:0] freq_sel = 3'd1;
  logic record_btn = 0, search_btn = 0, copy_btn = 0, write_btn = 0, input_btn = 0;
  logic output_btn = 0, enter_btn = 0, bit_sw = 0, trig_sw = 0, disp_sw = 0;
  logic [N-1:0] io_in, io_out, io_oe, mem_out;
  ch_led_t [N-1:0] ch_led;
  logic [AW-1:0] addr;
  logic [6:0] cursor;
  logic [11:0] delay_cnt;
  logic led_delay, led_record, led_search, led_copy, led_write, led_board_test, running;
  logic recog_strobe, step_taken, fail_halt;
  logic [7:0] sq_wave;

  logic_board_tester dut (.*);

  bit mem_m [N][DEPTH];
  bit rnd_tab [N][DEPTH];
  int checks = 0, failures = 0;
  int steps = 0, fails = 0, recogs = 0, age = 0;
  // board model controls
  int  stuck_addr = -1, glitch_addr = -1;
  bit  sq_on = 0, scramble = 0, use_ext = 0;
  bit  sq_rec [7][DEPTH];
  // mechanism counters
  int n_write_string = 0, n_random = 0, n_copy = 0, n_square = 0, n_scratch = 0;
  int n_program = 0, n_pass = 0, n_stuck = 0, n_glitch = 0, n_override = 0;
  int n_reverse = 0, n_search = 0, n_trigger = 0, n_delay_halt = 0, n_loop = 0, n_cursor = 0;

  always #5 clk = ~clk;

  assign ext_clk = use_ext & sq_wave[0];

  // board under test
  always_comb begin
    logic p0, p1;
    for (int c = 0; c < N; c++) io_in[c] = rnd_tab[c][addr] ^ scramble;
    p0 = io_oe[0] ? io_out[0] : io_in[0];
    p1 = io_oe[1] ? io_out[1] : io_in[1];
    io_in[0] = p0;
    io_in[1] = p1;
    io_in[2] = p0 & p1;
    io_in[3] = (p0 ^ p1) ^ (int'(addr) == stuck_addr) ^ (int'(addr) == glitch_addr && age == 12);
    if (sq_on) for (int x = 0; x < 7; x++) io_in[10 + x] = sq_wave[1 + x];
    for (int c = 0; c < N; c++) if (io_oe[c]) io_in[c] = io_out[c];
  end

  always @(posedge clk) begin
    if (step_taken) begin steps++; age <= 0; end else age <= age + 1;
    if (fail_halt) fails++;
    if (recog_strobe) recogs++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s addr=%0d", s, addr); end
  endtask
  task automatic press(ref logic b);
    @(negedge clk); b = 1; repeat (3) @(negedge clk); b = 0; repeat (2) @(negedge clk);
  endtask
  task automatic goto_addr(int a);
    if (!running) press(delay_set);
    begin_sw = AW'(a); press(bounds_set);
    ck(addr == AW'(a), $sformatf("goto %0d", a));
  endtask
  task automatic set_bounds(int b, int e);
    end_sw = AW'(e); goto_addr(b);
  endtask
  task automatic set_cursor(int c);
    while (cursor != 7'(c)) begin press(chan_up); n_cursor++; end
  endtask
  task automatic set_delay(int v);
    delay_sw = {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)};
    press(delay_set);
  endtask
  // run the generator until the tester halts (or max cycles)
  task automatic run_to_halt(int max_cycles);
    @(negedge clk); gen_on = 1;
    for (int i = 0; i < max_cycles && running; i++) @(negedge clk);
    gen_on = 0; repeat (40) @(negedge clk);
  endtask
  task automatic run_cycles(int n);
    @(negedge clk); gen_on = 1; repeat (n) @(negedge clk); gen_on = 0; repeat (40) @(negedge clk);
  endtask
  task automatic enter_ch(int c, bit b, bit t);
    set_cursor(c); bit_sw = b; trig_sw = t; press(enter_btn); bit_sw = 0; trig_sw = 0;
  endtask
  // compare the model word at a with the memory
  task automatic check_word(int a, string s);
    bit ok;
    goto_addr(a); #1; ok = 1;
    for (int c = 0; c < N; c++) if (mem_out[c] != mem_m[c][a]) ok = 0;
    ck(ok, $sformatf("%s word %0d", s, a));
  endtask

  initial begin
    int a0, k, exp_a, got;
    bit ok, b;
    for (int c = 0; c < N; c++) for (int a = 0; a < DEPTH; a++) rnd_tab[c][a] = 1'($urandom);
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    ck(running && led_record && led_delay && addr == 0, "power-up state");
    // read the power-up contents
    for (int a = 0; a < DEPTH; a++) begin
      begin_sw = AW'(a); press(bounds_set); #1;
      for (int c = 0; c < N; c++) mem_m[c][a] = mem_out[c];
    end

    // ---- 1. string of 1s in channel 5, 16 long from address 0
    goto_addr(0);
    set_cursor(5);
    set_delay(16);
    bit_sw = 1;
    @(negedge clk); write_btn = 1;
    run_to_halt(2000);
    write_btn = 0; bit_sw = 0; repeat (3) @(negedge clk);
    ck(!running && addr == 16 && led_write, "write string stops at 16");
    if (!running && addr == 16) n_delay_halt++;
    for (int a = 0; a < 16; a++) mem_m[5][a] = 1;
    ok = 1;
    for (int a = 0; a < 18; a++) begin
      begin_sw = AW'(a); press(delay_set); press(bounds_set); #1;
      for (int c = 0; c < N; c++) if (mem_out[c] != mem_m[c][a]) ok = 0;
    end
    ck(ok, "string of 1s"); if (ok) n_write_string++;

    // ---- 2. pseudorandom string in channel 6: run out 32 bits, then 40 bits at 100
    enter_ch(6, 0, 1);                 // BIT off, TRIGGER on, ENTER initialises
    goto_addr(500);
    set_delay(32); press(delay_count);
    run_to_halt(2000);
    ck(addr == 532, "run-out 32");
    goto_addr(100);
    set_delay(40);
    set_cursor(6);
    trig_sw = 1;
    @(negedge clk); write_btn = 1;
    run_to_halt(2000);
    write_btn = 0; trig_sw = 0; repeat (3) @(negedge clk);
    ck(addr == 140, "random string stops at 140");
    begin
      bit s [40];
      int ones;
      ones = 0; ok = 1;
      for (int i = 0; i < 40; i++) begin
        begin_sw = AW'(100 + i); press(delay_set); press(bounds_set); #1;
        s[i] = mem_out[6]; ones += s[i]; mem_m[6][100 + i] = s[i];
        for (int c = 0; c < N; c++) if (c != 6 && mem_out[c] != mem_m[c][100 + i]) ok = 0;
      end
      for (int i = 31; i < 40; i++) if (s[i] != (s[i - 31] ^ s[i - 28])) ok = 0;
      if (!ok) for (int i = 0; i < 40; i++) $write("%0d", s[i]);
      $display("");
      ck(ok && ones > 5 && ones < 35, $sformatf("pseudorandom recurrence (%0d ones)", ones));
      if (ok) n_random++;
    end
    check_word(140, "after random");

    // ---- 3. COPY word 3 to 40
    goto_addr(3);
    @(negedge clk); copy_btn = 1; repeat (3) @(negedge clk);
    begin_sw = AW'(40); press(bounds_set);
    @(negedge clk); copy_btn = 0; repeat (3) @(negedge clk);
    ck(led_copy, "copy mode");
    for (int c = 0; c < N; c++) mem_m[c][40] = mem_m[c][3];
    check_word(40, "copy target");
    check_word(3, "copy source");
    goto_addr(40); ok = 1; #1;
    for (int c = 0; c < N; c++) if (mem_out[c] != mem_m[c][3]) ok = 0;
    if (ok) n_copy++;

    // ---- 4. square waves: divider output 0 on the EXTERNAL CLOCK input,
    //      outputs 1..7 recorded in channels 10..16 at 200..499 (periods
    //      T0 .. 64 T0, T0 being two addresses)
    press(record_btn);
    ck(led_record, "record mode");
    sq_on = 1; use_ext = 1; freq_sel = 3'd0;
    goto_addr(200);
    set_delay(300); press(delay_count);
    run_to_halt(20000);
    sq_on = 0; use_ext = 0; freq_sel = 3'd1;
    ck(addr == 500, "record stops at 500");
    ok = 1;
    for (int a = 201; a < 500; a++) begin
      begin_sw = AW'(a); press(delay_set); press(bounds_set); #1;
      for (int x = 0; x < 7; x++) sq_rec[x][a] = mem_out[10 + x];
      mem_m[0][a] = rnd_tab[0][a]; mem_m[1][a] = rnd_tab[1][a];
      mem_m[2][a] = rnd_tab[0][a] & rnd_tab[1][a];
      mem_m[3][a] = rnd_tab[0][a] ^ rnd_tab[1][a];
      for (int c = 4; c < N; c++) mem_m[c][a] = (c >= 10 && c < 17) ? mem_out[c] : rnd_tab[c][a];
      for (int c = 0; c < N; c++) if (mem_out[c] != mem_m[c][a]) ok = 0;
    end
    ck(ok, "recording of the other channels");
    for (int x = 0; x < 7; x++) begin
      int last, runs;
      bit good;
      last = -1; runs = 0; good = 1;
      for (int a = 202; a < 500; a++) if (sq_rec[x][a] != sq_rec[x][a - 1]) begin
        if (last >= 0 && a - last != (1 << x)) good = 0;
        last = a; runs++;
      end
      ck(good && runs >= 2, $sformatf("square wave 2^%0d T0 (%0d edges)", x, runs));
      if (good && runs >= 2) n_square++;
    end

    // ---- 5. BOARD TEST
    // stimulus: 999-bit pseudorandom strings in channels 0 and 1
    for (int c = 0; c < 2; c++) begin
      goto_addr(0);
      set_delay(999);
      set_cursor(c);
      trig_sw = 1;
      @(negedge clk); write_btn = 1;
      run_to_halt(30000);
      write_btn = 0; trig_sw = 0; repeat (3) @(negedge clk);
      ck(addr == 999, "stimulus string length");
    end
    ok = 1;
    for (int a = 0; a < 999; a++) begin
      begin_sw = AW'(a); press(delay_set); press(bounds_set); #1;
      mem_m[0][a] = mem_out[0]; mem_m[1][a] = mem_out[1];
      for (int c = 2; c < N; c++) if (mem_out[c] != mem_m[c][a]) ok = 0;
    end
    ck(ok, "stimulus strings touched only channels 0 and 1");
    press(record_btn);
    press(delay_set);
    goto_addr(S_OUT);
    set_cursor(0); press(output_btn);
    set_cursor(1); press(output_btn);
    ck(led_board_test && io_oe[0] && io_oe[1] && !io_oe[2], "outputs assigned");
    mem_m[0][S_OUT] = 1; mem_m[1][S_OUT] = 1;
    check_word(S_OUT, "output scratchpad");
    n_scratch++;
    // program-building pass: two loops over 0..LOOP_END
    set_bounds(0, LOOP_END);
    a0 = steps;
    run_cycles(2 * (LOOP_END + 1) * 20 + 100);
    ck(running && steps - a0 >= LOOP_END + 2, "program pass ran");
    if (steps - a0 > LOOP_END + 1) n_loop++;
    for (int a = 0; a <= LOOP_END; a++) begin
      mem_m[2][a] = mem_m[0][a] & mem_m[1][a];
      mem_m[3][a] = mem_m[0][a] ^ mem_m[1][a];
      for (int c = 4; c < N; c++) mem_m[c][a] = rnd_tab[c][a];
    end
    ok = 1;
    for (int a = 0; a <= LOOP_END; a += 7) begin
      begin_sw = AW'(a); press(bounds_set); #1;
      for (int c = 0; c < N; c++) if (mem_out[c] != mem_m[c][a]) ok = 0;
    end
    ck(ok, "program pass recorded responses"); if (ok) n_program++;
    // inputs
    goto_addr(S_IN);
    set_cursor(2); press(input_btn);
    set_cursor(3); press(input_btn);
    mem_m[2][S_IN] = 1; mem_m[3][S_IN] = 1;
    check_word(S_IN, "input scratchpad");
    // test pass on the good board
    set_bounds(0, LOOP_END);
    fails = 0;
    run_cycles(2 * (LOOP_END + 1) * 20 + 100);
    ck(running && fails == 0, "good board passes"); if (running && fails == 0) n_pass++;
    // stuck fault on channel 3 at the first address from 300 where its good
    // response is 0, so its glitch latch must capture a 1 (the pseudorandom
    // stimulus makes such an address come soon)
    k = 300;
    while (mem_m[3][k] && k < LOOP_END) k++;
    stuck_addr = k;
    run_to_halt(50000);
    ck(!running && int'(addr) == k && fails == 1, $sformatf("stuck fault halts at %0d", k));
    disp_sw = 0; #1; b = ch_led[3].l3;
    disp_sw = 1; #1;
    ck(!b && ch_led[3].l3 && ch_led[2].l3 == mem_m[2][k], "fault blinks only on channel 3");
    if (!running && int'(addr) == k) n_stuck++;
    disp_sw = 0;
    // halt override carries the test through the fault
    @(negedge clk); delay_set = 1; gen_on = 1;
    repeat (64 * 20) @(negedge clk);
    gen_on = 0; repeat (40) @(negedge clk); delay_set = 0; repeat (3) @(negedge clk);
    ck(running && int'(addr) > k && fails == 1, "override runs past the fault");
    if (running && int'(addr) > k) n_override++;
    stuck_addr = -1;
    // one-cycle glitch at 450
    glitch_addr = 450; fails = 0;
    run_to_halt(50000);
    ck(!running && addr == 450 && fails == 1, "glitch halts at 450");
    if (!running && addr == 450) n_glitch++;
    glitch_addr = -1;
    press(delay_set);
    // reverse sweep executes nothing
    scramble = 1;
    a0 = addr;
    press(mem_dn);
    ck(addr == AW'(a0 - 1), "reverse step");
    scramble = 0;
    check_word(a0 - 1, "reverse sweep left memory alone");
    if (addr == AW'(a0 - 1)) n_reverse++;

    // ---- 6. SEARCH MEMORY for the word at 700 in channels 0..9
    press(record_btn);
    press(search_btn);
    ck(led_search && !led_board_test, "search mode");
    k = 700;
    for (int c = 0; c < 10; c++) enter_ch(c, mem_m[c][k], 1);
    set_bounds(0, LOOP_END);
    exp_a = -1;
    for (int a = 1; a <= LOOP_END && exp_a < 0; a++) begin
      ok = 1;
      for (int c = 0; c < 10; c++) if (mem_m[c][a] != mem_m[c][k]) ok = 0;
      if (ok) exp_a = a;
    end
    set_delay(0);
    recogs = 0;
    run_to_halt(50000);
    ck(!running && int'(addr) == exp_a && recogs >= 1, $sformatf("search halts at %0d", exp_a));
    if (!running && int'(addr) == exp_a) n_search++;

    // ---- 7. RECORD with trigger on channels 4..9 and 5 words of delay
    press(record_btn);
    k = 600;
    for (int c = 4; c < 10; c++) enter_ch(c, rnd_tab[c][k], 1);
    set_bounds(0, LOOP_END);
    exp_a = -1;
    for (int a = 1; a <= LOOP_END && exp_a < 0; a++) begin
      ok = 1;
      for (int c = 4; c < 10; c++) if (rnd_tab[c][a] != rnd_tab[c][k]) ok = 0;
      if (ok) exp_a = a;
    end
    set_delay(5);
    recogs = 0;
    run_to_halt(50000);
    ck(!running && int'(addr) == exp_a + 5 && recogs >= 1,
       $sformatf("post-trigger halt at %0d (trigger %0d)", addr, exp_a));
    if (!running && int'(addr) == exp_a + 5) n_trigger++;

    // ---- every mechanism must have happened
    $display("mechanisms: write_string=%0d random=%0d copy=%0d square=%0d scratchpad=%0d",
             n_write_string, n_random, n_copy, n_square, n_scratch);
    $display("            program=%0d pass=%0d stuck=%0d glitch=%0d override=%0d reverse=%0d",
             n_program, n_pass, n_stuck, n_glitch, n_override, n_reverse);
    $display("            search=%0d trigger=%0d delay_halt=%0d loop=%0d cursor_steps=%0d",
             n_search, n_trigger, n_delay_halt, n_loop, n_cursor);
    begin
      int m [16];
      m = '{n_write_string, n_random, n_copy, n_square, n_scratch, n_program, n_pass,
            n_stuck, n_glitch, n_override, n_reverse, n_search, n_trigger, n_delay_halt,
            n_loop, n_cursor};
      foreach (m[i]) begin checks++; if (m[i] == 0) begin failures++; $display("ERR mechanism %0d never happened", i); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
