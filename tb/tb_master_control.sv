// tb_master_control: master register flags, the CFR address bits sent to the
// channels, and the strobes of ENTER, INPUT, OUTPUT, WRITE, COPY and RECORD,
// including the step-strobe inhibits (reverse sweep, COPY held).
module tb_master_control;
  import lbt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic record_btn = 0, search_btn = 0, copy_btn = 0, write_btn = 0, input_btn = 0;
  logic output_btn = 0, enter_btn = 0, bit_sw = 0, trig_sw = 0, disp_sw = 0, prng_q = 0;
  logic step_ok = 0, step_manual = 0, step_up = 1, seq_lat = 0, seq_cmp = 0, cmp_open = 0;
  chan_ctrl_t ctrl;
  flag_e flag;
  logic bt, prng_init, delay_start;
  int checks = 0, failures = 0;

  master_control dut (.clk, .rst_n, .record_btn, .search_btn, .copy_btn, .write_btn,
    .input_btn, .output_btn, .enter_btn, .bit_sw, .trig_sw, .disp_sw, .prng_q, .step_ok,
    .step_manual, .step_up, .seq_lat, .seq_cmp, .cmp_open, .ctrl, .flag, .bt, .prng_init,
    .delay_start);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s (cfr_a=%b flag=%0d)", s, ctrl.cfr_a, flag); end
  endtask
  // a memory step followed by its delay-line strobes; returns the strobes seen
  task automatic do_step(bit manual, bit up, output bit lat, output bit wr);
    lat = 0; wr = 0;
    @(negedge clk); step_ok = 1; step_manual = manual; step_up = up;
    @(negedge clk); step_ok = 0; step_manual = 0;
    seq_lat = 1; #1; lat = ctrl.lat_stb;
    @(negedge clk); seq_lat = 0; seq_cmp = 1; #1; wr = ctrl.wr_stb;
    @(negedge clk); seq_cmp = 0;
  endtask

  initial begin
    bit l, w;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); ck(flag == F_RECORD && !bt && ctrl.cfr_a == 3'b000, "reset state");
    // RECORD: generator and forward sweep steps write, reverse sweep does not
    do_step(0, 1, l, w); ck(l && w, "record gen step strobes");
    do_step(1, 1, l, w); ck(l && w, "record sweep forward strobes");
    do_step(1, 0, l, w); ck(!l && !w, "record sweep reverse inhibited");
    // ENTER and the BIT line
    @(negedge clk); enter_btn = 1; #1; ck(ctrl.enter && prng_init, "enter stroke");
    @(negedge clk); #1; ck(!ctrl.enter, "enter one cycle"); enter_btn = 0;
    bit_sw = 0; trig_sw = 1; prng_q = 1; #1; ck(ctrl.edit_bit, "random bit");
    prng_q = 0; #1; ck(!ctrl.edit_bit, "random bit 0");
    bit_sw = 1; #1; ck(ctrl.edit_bit && ctrl.edit_trig, "bit switch");
    // ENTER with BIT off, TRIGGER on enters a 0 whatever the generator shows
    bit_sw = 0; prng_q = 1;
    @(negedge clk); enter_btn = 1; #1; ck(ctrl.enter && !ctrl.edit_bit && ctrl.edit_trig, "enter trigger on 0");
    @(negedge clk); enter_btn = 0; #1; ck(ctrl.edit_bit, "generator bit after enter");
    repeat (2) @(negedge clk); prng_q = 0; trig_sw = 0;
    // SEARCH
    @(negedge clk); search_btn = 1; @(negedge clk); search_btn = 0;
    ck(flag == F_SEARCH && ctrl.cfr_a == 3'b010, "search");
    do_step(1, 1, l, w); ck(l && w, "sweep forward executes");
    do_step(1, 0, l, w); ck(!l && !w, "sweep reverse inhibited");
    // COPY
    @(negedge clk); copy_btn = 1; #1; ck(ctrl.lat_stb, "copy latches word");
    @(negedge clk); #1; ck(flag == F_COPY && ctrl.cfr_a == 3'b011 && !ctrl.lat_stb, "copy held");
    do_step(1, 1, l, w); ck(!l && !w, "copy held blocks strobes");
    @(negedge clk); copy_btn = 0; #1; ck(ctrl.wr_stb && ctrl.cfr_a == 3'b011, "copy release write");
    @(negedge clk); #1; ck(!ctrl.wr_stb && ctrl.cfr_a == 3'b010, "copy idle");
    // WRITE
    @(negedge clk); write_btn = 1; #1; ck(ctrl.j_set && delay_start, "write press");
    @(negedge clk); #1; ck(ctrl.wr_stb && ctrl.cfr_a == 3'b110 && flag == F_WRITE, "write stroke");
    @(negedge clk); #1; ck(!ctrl.wr_stb, "write stroke once");
    do_step(0, 1, l, w); ck(w, "write held: steps write");
    @(negedge clk); write_btn = 0; #1; ck(ctrl.j_clr, "write release");
    @(negedge clk); @(negedge clk); #1; ck(ctrl.cfr_a == 3'b110, "write idle address 6");
    // RECORD
    @(negedge clk); record_btn = 1; #1; ck(ctrl.clr_all, "record clears");
    @(negedge clk); record_btn = 0; ck(flag == F_RECORD && ctrl.cfr_a == 3'b000, "record");
    // INPUT / OUTPUT and BOARD TEST
    @(negedge clk); input_btn = 1; #1; ck(ctrl.set_in && !ctrl.wr_stb, "input set");
    @(negedge clk); #1; ck(bt && ctrl.wr_stb && ctrl.cfr_a == 3'b110, "input scratchpad stroke");
    @(negedge clk); input_btn = 0; #1; ck(!ctrl.wr_stb && ctrl.cfr_a == 3'b000, "board test address 0");
    @(negedge clk); output_btn = 1; #1; ck(ctrl.set_out, "output set");
    @(negedge clk); #1; ck(ctrl.wr_stb && ctrl.cfr_a == 3'b010, "output scratchpad stroke");
    @(negedge clk); output_btn = 0;
    @(negedge clk); search_btn = 1; @(negedge clk); search_btn = 0;
    ck(flag == F_RECORD && bt, "board test locks the register");
    do_step(1, 1, l, w); ck(l && w, "sweep executes in board test");
    @(negedge clk); record_btn = 1; @(negedge clk); record_btn = 0;
    ck(!bt, "record leaves board test");
    cmp_open = 1; disp_sw = 1; #1; ck(ctrl.cmp_en && ctrl.disp_sel, "window, display");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
