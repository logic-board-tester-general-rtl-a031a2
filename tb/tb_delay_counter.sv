// tb_delay_counter: BCD countdown from several thumbwheel values, checking the
// count as a decimal number after every step, the final_step flag on the step
// from 1 to 0, zero_halt once the count is spent, the enable flip-flop set by
// set_en and by recog, cleared by clear_en, and the 000 + recognition halt.
module tb_delay_counter;
  logic clk = 0, rst_n = 0;
  logic [11:0] bcd_in = '0, count;
  logic load = 0, clear_en = 0, set_en = 0, recog = 0, step = 0;
  logic enabled, zero_halt, final_step;
  int checks = 0, failures = 0;

  delay_counter dut (.clk, .rst_n, .bcd_in, .load, .clear_en, .set_en, .recog, .step,
                     .count, .enabled, .zero_halt, .final_step);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dec(logic [11:0] b);
    return b[11:8] * 100 + b[7:4] * 10 + b[3:0];
  endfunction
  function automatic logic [11:0] tobcd(int v);
    return {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s count=%h", s, count); end
  endtask

  initial begin
    int vals[5] = '{64, 1, 100, 999, 10};
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (vals[k]) begin
      @(negedge clk); bcd_in = tobcd(vals[k]); load = 1; clear_en = 1;
      @(negedge clk); load = 0; clear_en = 0;
      ck(dec(count) == vals[k] && !enabled && !zero_halt, "load");
      step = 1; @(negedge clk); step = 0;
      ck(dec(count) == vals[k], "no count while disabled");
      if (k % 2 == 0) set_en = 1; else recog = 1;
      @(negedge clk); set_en = 0; recog = 0;
      ck(enabled, "enable");
      for (int n = vals[k]; n > 0; n--) begin
        ck(final_step == (n == 1), "final_step");
        ck(!zero_halt, "no early halt");
        step = 1; @(negedge clk); step = 0;
        ck(dec(count) == n - 1, "count");
      end
      ck(zero_halt, "zero halt");
      step = 1; @(negedge clk); step = 0;
      ck(count == 12'h000, "stays at zero");
    end
    // DELAY 000 with a recognition halts at once
    @(negedge clk); bcd_in = 12'h000; load = 1; clear_en = 1;
    @(negedge clk); load = 0; clear_en = 0;
    ck(!zero_halt, "000 idle");
    recog = 1; #1; ck(zero_halt, "000 recog halt");
    @(negedge clk); recog = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
