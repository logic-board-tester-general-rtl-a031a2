// tb_io_channel: one channel driven through every function of its channel
// function ROM: recording the I/O line, latching memory, OUTPUT drive and
// compare, INPUT compare, search trigger, COPY of a word, WRITE of the BIT
// line, scratchpad assignment writes, glitch capture and the display.
module tb_io_channel;
  import lbt_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  chan_ctrl_t ctrl;
  logic glitch_clk = 0, sel = 1, io_in = 0;
  logic [5:0] addr = '0;
  logic io_out, io_oe, mismatch, trig_en, trig_hit, mem_out;
  logic [7:0] cfr_code;
  chreg_t creg;
  ch_led_t led;
  bit ref_mem [DEPTH];
  int checks = 0, failures = 0;

  io_channel #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .ctrl, .glitch_clk, .sel, .addr, .io_in,
    .io_out, .io_oe, .mismatch, .trig_en, .trig_hit, .mem_out, .cfr_code, .creg, .led);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s", s); end
  endtask
  task automatic strobe_wr(int a);
    @(negedge clk); addr = 6'(a); ctrl.wr_stb = 1; @(negedge clk); ctrl.wr_stb = 0;
  endtask
  task automatic strobe_lat(int a);
    @(negedge clk); addr = 6'(a); ctrl.lat_stb = 1; @(negedge clk); ctrl.lat_stb = 0;
  endtask
  task automatic pulse_enter(bit b, bit t);
    @(negedge clk); ctrl.edit_bit = b; ctrl.edit_trig = t; ctrl.enter = 1;
    @(negedge clk); ctrl.enter = 0;
  endtask

  initial begin
    ctrl = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // RECORD: the I/O line is written on each write strobe
    @(negedge clk); ck(cfr_code == 8'h96 && !io_oe, "record code");
    for (int a = 0; a < DEPTH; a++) begin
      io_in = 1'($urandom); ref_mem[a] = io_in; strobe_wr(a);
    end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); addr = 6'(a); #1;
      ck(mem_out == ref_mem[a] && led.l3 == ref_mem[a], "recorded data");
    end
    // RECORD trigger on the I/O line
    pulse_enter(1, 1);
    ck(creg.bit_v && creg.trig && trig_en, "trigger marked");
    io_in = 1; #1; ck(trig_hit, "trigger hit on 1");
    io_in = 0; #1; ck(!trig_hit, "trigger miss on 0");
    // OUTPUT: drive the latched memory, compare the pin with it
    @(negedge clk); ctrl.set_out = 1; @(negedge clk); ctrl.set_out = 0;
    ck(cfr_code == 8'h7A && io_oe && !trig_en, "output code");
    for (int a = 0; a < 8; a++) begin
      strobe_lat(a);
      ck(io_out == ref_mem[a], "output drive");
      io_in = ref_mem[a]; ctrl.cmp_en = 1; #1; ck(!mismatch, "output ok");
      io_in = ~ref_mem[a]; #1; ck(mismatch, "output fault");
      ctrl.cmp_en = 0; #1; ck(!mismatch, "no compare outside window");
    end
    // glitch capture
    io_in = 1; glitch_clk = 1; @(negedge clk); glitch_clk = 0; io_in = 0;
    ctrl.disp_sel = 1; #1; ck(led.l3 == 1 && led.l2 == 1 && led.l1 == 0, "glitch display");
    ctrl.disp_sel = 0;
    // INPUT: no drive, compare
    @(negedge clk); ctrl.set_in = 1; @(negedge clk); ctrl.set_in = 0;
    ck(cfr_code == 8'hFA && !io_oe, "input code");
    strobe_lat(5); ctrl.cmp_en = 1;
    io_in = ref_mem[5]; #1; ck(!mismatch, "input ok");
    io_in = ~ref_mem[5]; #1; ck(mismatch, "input fault");
    ctrl.cmp_en = 0;
    // INPUT scratchpad stroke (address 16) writes a 1, OUTPUT stroke (12) does not
    @(negedge clk); ctrl.cfr_a = 3'b110; #1; ck(cfr_code == 8'h8C, "input stroke code");
    ref_mem[9] = 1; strobe_wr(9);
    @(negedge clk); ctrl.cfr_a = 3'b010; #1; ck(cfr_code == 8'h50, "inhibit code");
    strobe_wr(10);
    ctrl.cfr_a = 3'b000;
    @(negedge clk); addr = 9;  #1; ck(mem_out == 1, "scratchpad 1");
    @(negedge clk); addr = 10; #1; ck(mem_out == ref_mem[10], "inhibited");
    // back to recorder with ENTER (BIT 0, TRIGGER 1), then SEARCH (address 2)
    pulse_enter(0, 1);
    ctrl.cfr_a = 3'b010; #1; ck(cfr_code == 8'hCD && trig_en, "search code");
    for (int a = 0; a < 8; a++) begin
      strobe_lat(a); #1; ck(trig_hit == (ref_mem[a] == 0), "search compare");
    end
    // COPY: latch word 3, write it at 20 while address 3 is presented
    strobe_lat(3);
    ctrl.cfr_a = 3'b011; #1; ck(cfr_code == 8'hA8, "copy code");
    ref_mem[20] = ref_mem[3]; strobe_wr(20);
    ctrl.cfr_a = 3'b010;
    strobe_wr(21);  // address 2: no write
    @(negedge clk); addr = 20; #1; ck(mem_out == ref_mem[20], "copied");
    @(negedge clk); addr = 21; #1; ck(mem_out == ref_mem[21], "copy idle no write");
    // WRITE: J flag makes this channel address 16, BIT line written
    @(negedge clk); ctrl.cfr_a = 3'b110; ctrl.edit_bit = ~ref_mem[30]; ctrl.j_set = 1;
    @(negedge clk); ctrl.j_set = 0;
    ck(cfr_code == 8'h8C, "write code");
    ref_mem[30] = ~ref_mem[30]; strobe_wr(30);
    ctrl.edit_bit = ~ref_mem[31]; ref_mem[31] = ~ref_mem[31]; strobe_wr(31);
    @(negedge clk); ctrl.j_clr = 1; @(negedge clk); ctrl.j_clr = 0;
    ck(cfr_code == 8'hE8, "write idle code");
    strobe_wr(32);
    for (int a = 30; a < 33; a++) begin
      @(negedge clk); addr = 6'(a); #1; ck(mem_out == ref_mem[a], "write bits");
    end
    // RECORD clears the register
    @(negedge clk); ctrl.clr_all = 1; @(negedge clk); ctrl.clr_all = 0;
    ck(creg == '0, "clear all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
