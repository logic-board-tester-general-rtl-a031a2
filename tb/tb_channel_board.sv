// tb_channel_board: ten channels on one board: record a random word per address
// on all ten, make some channels OUTPUT and INPUT, and check the board's
// mismatch, trigger-marked and trigger-miss outputs against a reference.
module tb_channel_board;
  import lbt_pkg::*;
  localparam int DEPTH = 32, N = 10;
  logic clk = 0, rst_n = 0;
  chan_ctrl_t ctrl;
  logic glitch_clk = 0;
  logic [N-1:0] sel = '0, io_in = '0, io_out, io_oe, mem_out;
  logic [4:0] addr = '0;
  ch_led_t [N-1:0] led;
  logic mismatch_any, trig_any, trig_miss;
  logic [N-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  channel_board #(.NCH(N), .DEPTH(DEPTH)) dut (.clk, .rst_n, .ctrl, .glitch_clk, .sel, .addr,
    .io_in, .io_out, .io_oe, .mem_out, .led, .mismatch_any, .trig_any, .trig_miss);

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

  initial begin
    logic [N-1:0] outs, ins, trig, bits;
    ctrl = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); addr = 5'(a); io_in = N'($urandom); ref_mem[a] = io_in; ctrl.wr_stb = 1;
      @(negedge clk); ctrl.wr_stb = 0;
    end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); addr = 5'(a); #1; ck(mem_out == ref_mem[a], "recorded words");
    end
    // trigger pattern on channels 1, 4, 7 in RECORD
    trig = N'(10'b0010010010); bits = N'(10'b0000010010);
    for (int c = 0; c < N; c++) if (trig[c]) begin
      @(negedge clk); sel = N'(1) << c; ctrl.edit_bit = bits[c]; ctrl.edit_trig = 1; ctrl.enter = 1;
      @(negedge clk); ctrl.enter = 0; sel = '0;
    end
    ck(trig_any, "trig marked");
    for (int i = 0; i < 50; i++) begin
      io_in = N'($urandom); #1;
      ck(trig_miss == |((io_in ^ bits) & trig), "trigger miss");
    end
    // channels 0-2 OUTPUT, 3-5 INPUT
    outs = N'(10'b0000000111); ins = N'(10'b0000111000);
    for (int c = 0; c < 6; c++) begin
      @(negedge clk); sel = N'(1) << c; ctrl.set_out = outs[c]; ctrl.set_in = ins[c];
      @(negedge clk); ctrl.set_out = 0; ctrl.set_in = 0; sel = '0;
    end
    ck(io_oe == outs && trig_any, "drive enables (channel 7 still a trigger recorder)");
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); addr = 5'(a); ctrl.lat_stb = 1; @(negedge clk); ctrl.lat_stb = 0;
      ck((io_out & outs) == (ref_mem[a] & outs), "outputs drive memory");
      ctrl.cmp_en = 1;
      io_in = ref_mem[a] ^ N'($urandom_range(0, 1023)); #1;
      ck(mismatch_any == |((io_in ^ ref_mem[a]) & (outs | ins)), "board mismatch");
      ctrl.cmp_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
