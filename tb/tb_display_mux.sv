// tb_display_mux: all 2**7 input combinations of the display multiplexer.
module tb_display_mux;
  import lbt_pkg::*;
  logic sel, cursor, memory, glitch;
  chreg_t creg;
  ch_led_t led, exp_led;
  int checks = 0, failures = 0;

  display_mux dut (.sel, .cursor, .creg, .memory, .glitch, .led);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {sel, cursor, memory, glitch, creg} = 8'(v);
      #1;
      exp_led.cur = cursor;
      exp_led.l1  = sel ? creg.inp  : creg.bit_v;
      exp_led.l2  = sel ? creg.outp : creg.trig;
      exp_led.l3  = sel ? glitch    : memory;
      checks++;
      if (led !== exp_led) begin failures++; $display("ERR v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
