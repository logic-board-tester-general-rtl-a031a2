// tb_run_control: the run flip-flop; steps pass while running, a delay halt or
// a failure stops it (and that step), override restarts it and beats both
// halts, halted_by_fail pulses once per failure stop.
module tb_run_control;
  logic clk = 0, rst_n = 0;
  logic halt_ovr = 0, delay_halt = 0, fail = 0, step_req = 0;
  logic run, step_ok, halted_by_fail;
  int checks = 0, failures = 0, hb = 0;

  run_control dut (.clk, .rst_n, .halt_ovr, .delay_halt, .fail, .step_req, .run,
                   .step_ok, .halted_by_fail);

  always #5 clk = ~clk;
  always @(posedge clk) if (halted_by_fail) hb++;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); ck(run, "run after reset");
    step_req = 1; #1; ck(step_ok, "step passes");
    delay_halt = 1; #1; ck(!step_ok, "step blocked by halt");
    @(negedge clk); delay_halt = 0; #1; ck(!run && !step_ok, "halted");
    halt_ovr = 1; #1; ck(!step_ok, "not yet running");
    @(negedge clk); ck(run && step_ok, "override restarts");
    fail = 1; #1; ck(step_ok && !halted_by_fail, "override beats fail");
    @(negedge clk); halt_ovr = 0; #1; ck(!step_ok && halted_by_fail, "fail stops");
    @(negedge clk); #1; ck(!run && !halted_by_fail, "one glitch clock");
    fail = 0; @(negedge clk); ck(!run, "stays halted");
    ck(hb == 1, "one halt pulse");
    step_req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
