// run_control: the flip-flop that lets the memory counter be clocked.
//
// run is set at reset and, as a halt override, for as long as halt_ovr is
// high (DELAY toggle held at SET).  It is cleared when the delay counter
// reaches zero (delay_halt) or, in BOARD TEST, when a compared channel
// mismatches (fail).  Override wins over both.  A memory step request is
// accepted only while run is high and no halt arrives in the same cycle; the
// halt also stops the strobes of that step (the document's gate that stops
// pulses already travelling in the delay line).  halted_by_fail pulses on the
// cycle a mismatch stops the tester and clocks every glitch latch.
module run_control (
  input  logic clk,
  input  logic rst_n,
  input  logic halt_ovr,
  input  logic delay_halt,
  input  logic fail,
  input  logic step_req,
  output logic run,
  output logic step_ok,
  output logic halted_by_fail
);
  logic halt_now;

  assign halt_now       = !halt_ovr && (delay_halt || fail);
  assign step_ok        = step_req && run && !halt_now;
  assign halted_by_fail = run && !halt_ovr && fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         run <= 1'b1;
    else if (halt_ovr)  run <= 1'b1;
    else if (halt_now)  run <= 1'b0;
  end
endmodule
