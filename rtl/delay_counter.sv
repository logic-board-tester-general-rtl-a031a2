// delay_counter: the 3-digit BCD DELAY counter and its count-enable flip-flop.
//
// The counter holds 000..999 in BCD.  load copies the thumbwheel value in
// (DELAY SET, PROGRAM BOUNDS SET, power-up).  The enable flip-flop (the DELAY
// LED is lit while it is clear) is cleared by clear_en (DELAY SET, power-up)
// and set by set_en (DELAY COUNT toggle, WRITE button) or by recog, a data
// recognition from the comparators (the flip-flop's D input used as a missing
// pulse detector).  While enabled, each step counts down by one; the count
// never goes below zero.  zero_halt is high when counting is enabled and the
// count is zero, or when a recognition arrives with the count already zero (a
// DELAY of 000 halts on the match itself); it is combinational so the run
// flip-flop stops at once.  final_step is high while a step would take the
// count from 1 to 0: that step still moves the address, but its strobes are
// dropped, so a DELAY of N executes N-1 steps after the starting word and the
// address stops N words on (64 from 000 stops at 040 hex).
module delay_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] bcd_in,
  input  logic        load,
  input  logic        clear_en,
  input  logic        set_en,
  input  logic        recog,
  input  logic        step,
  output logic [11:0] count,
  output logic        enabled,
  output logic        zero_halt,
  output logic        final_step
);
  logic zero, last;

  assign zero = (count == 12'h000);
  assign last = (count == 12'h001);

  function automatic logic [11:0] bcd_dec(input logic [11:0] v);
    logic [11:0] r;
    r = v;
    if (r[3:0] != 4'd0) r[3:0] = r[3:0] - 4'd1;
    else begin
      r[3:0] = 4'd9;
      if (r[7:4] != 4'd0) r[7:4] = r[7:4] - 4'd1;
      else begin
        r[7:4]  = 4'd9;
        r[11:8] = r[11:8] - 4'd1;
      end
    end
    return r;
  endfunction

  assign zero_halt  = (enabled && zero) || (recog && zero);
  assign final_step = enabled && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      enabled <= 1'b0;
    end else begin
      if (load)                        count <= bcd_in;
      else if (step && enabled && !zero) count <= bcd_dec(count);
      if (clear_en)                    enabled <= 1'b0;
      else if (set_en || recog)        enabled <= 1'b1;
    end
  end
endmodule
