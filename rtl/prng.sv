// prng: pseudorandom bit source for writing random strings into a channel.
//
// A 31-bit Fibonacci linear feedback shift register, taps 31 and 28, maximal
// length (2**31 - 1 bits before it repeats).  init reloads the seed (the ENTER
// button); each step shifts once and the output is the last stage.  The first
// 31 bits out after init are the seed itself, identical every time, which is
// why the document has the operator run out the first 32 bits before writing
// a string ("the first 32 bits or so of the string are not truly random").
// The seed is a mixed pattern of this design's choosing; a sparse seed such as
// a single 1 would keep the stream sparse for well over 32 bits.  The
// document borrows its generator from elsewhere without its circuit; this
// register is this design's stand-in.
module prng #(
  parameter int unsigned W    = 31,
  parameter int unsigned TAP2 = 28,
  parameter logic [30:0] SEED = 31'h4F6D_1C35
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic step,
  output logic q
);
  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sr <= SEED[W-1:0];
    else if (init)      sr <= SEED[W-1:0];
    else if (step)      sr <= {sr[W-2:0], sr[W-1] ^ sr[TAP2-1]};
  end

  assign q = sr[W-1];
endmodule
