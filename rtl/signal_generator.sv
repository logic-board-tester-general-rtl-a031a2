// signal_generator: the frequency-selectable clock for the memory counter.
//
// A free-running oscillator (the system clock divided by OSC_DIV, standing in
// for the 9 MHz crystal; with a 25 ns clock the default 5 gives 8 MHz, the
// nearest rate at which divider output 0, used as the external clock, still
// leaves the delay line its full step) drives an 8-output binary divider;
// output k toggles every 2**k oscillator periods, so it runs at f_osc / 2**(k+1).  A 1-of-8
// selector picks the source: position 0 is the EXTERNAL CLOCK input, positions
// 1..7 are divider outputs 1..7.  The selected source goes through a positive
// edge detector; every rising edge while the generator is on gives one
// single-cycle step pulse.  'on' is sampled only at rising edges of the source,
// so switching the generator on or off always yields whole source cycles.
// ext_clk passes a two-flop synchronizer first.  div exposes the divider
// outputs as square-wave sources (period 2**(k+1) oscillator periods).
module signal_generator #(
  parameter int unsigned OSC_DIV = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       on,
  input  logic [2:0] sel,
  input  logic       ext_clk,
  output logic       step,
  output logic [7:0] div
);
  localparam int unsigned PW = (OSC_DIV > 1) ? $clog2(OSC_DIV) : 1;

  logic [PW-1:0] pre;
  logic          osc_tick;
  logic          src, src_d, src_rise, on_q;
  logic [1:0]    ext_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pre <= '0;
    else        pre <= (pre == PW'(OSC_DIV - 1)) ? '0 : pre + 1'b1;
  end
  assign osc_tick = (pre == PW'(OSC_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        div <= '0;
    else if (osc_tick) div <= div + 1'b1;
  end

  assign src      = (sel == 3'd0) ? ext_sync[1] : div[sel];
  assign src_rise = src && !src_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_d    <= 1'b0;
      on_q     <= 1'b0;
      ext_sync <= '0;
    end else begin
      ext_sync <= {ext_sync[0], ext_clk};
      src_d    <= src;
      if (src_rise) on_q <= on;
    end
  end

  assign step = src_rise && on_q;
endmodule
