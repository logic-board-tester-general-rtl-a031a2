// memory_counter: the RAM address counter with its program-loop bounds.
//
// Two latches hold the BEGIN (lower) and END (upper) program bounds.  load
// copies the thumbwheel values into both latches and BEGIN into the counter
// (PROGRAM BOUNDS SET, power-up).  On step the counter moves one address: up,
// it compares with END (the upper bound comparator) and reloads BEGIN after END,
// so the memory loops inside the bounds; down, it simply decrements and leaves
// the loop below BEGIN, as the document describes for reverse sweep.  The
// counter is AW bits wide (10 bits for 1024 words) and wraps modulo 2**AW.
// Synchronous; addr changes on the clock edge after step.
module memory_counter #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] begin_in,
  input  logic [AW-1:0] end_in,
  input  logic          step,
  input  logic          up,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] begin_q,
  output logic [AW-1:0] end_q,
  output logic          at_end
);
  assign at_end = (addr == end_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      begin_q <= '0;
      end_q   <= '0;
      addr    <= '0;
    end else if (load) begin
      begin_q <= begin_in;
      end_q   <= end_in;
      addr    <= begin_in;
    end else if (step) begin
      if (up) addr <= at_end ? begin_q : addr + 1'b1;
      else    addr <= addr - 1'b1;
    end
  end
endmodule
