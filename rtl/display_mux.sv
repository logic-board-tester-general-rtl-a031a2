// display_mux: the 2-to-1 display multiplexer of one channel (a 74LS158 section).
//
// With sel low LEDs 1..3 show BIT, TRIGGER and MEMORY; with sel high they show
// INPUT, OUTPUT and GLITCH.  Toggling sel makes a channel whose memory bit and
// glitch-latch bit differ blink.  The CUR LED is driven by the cursor line
// directly.  Combinational.
module display_mux
  import lbt_pkg::*;
(
  input  logic    sel,
  input  logic    cursor,
  input  chreg_t  creg,
  input  logic    memory,
  input  logic    glitch,
  output ch_led_t led
);
  always_comb begin
    led.cur = cursor;
    if (!sel) begin
      led.l1 = creg.bit_v;
      led.l2 = creg.trig;
      led.l3 = memory;
    end else begin
      led.l1 = creg.inp;
      led.l2 = creg.outp;
      led.l3 = glitch;
    end
  end
endmodule
