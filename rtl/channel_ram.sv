// channel_ram: one channel's program memory, DEPTH x 1 bit (a 2125-class static RAM).
//
// Read is asynchronous: dout follows addr combinationally, as the static RAM's
// data output does.  A write stores din at addr on a clock edge where we is high.
// Contents are not reset: at power-on the memory holds an arbitrary pattern,
// which the tester uses on purpose as a ready-made random stimulus.
module channel_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic          din,
  output logic          dout
);
  logic mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= din;

  assign dout = mem[addr];
endmodule
