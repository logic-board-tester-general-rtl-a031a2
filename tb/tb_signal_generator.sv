// tb_signal_generator: for every divider position the step pulses must come
// exactly every OSC_DIV * 2**(sel+1) cycles; the external clock position must
// give one step per external rising edge; switching off stops the steps.
module tb_signal_generator;
  localparam int OSC_DIV = 4;
  logic clk = 0, rst_n = 0, on = 0, ext_clk = 0, step;
  logic [2:0] sel = 3'd1;
  logic [7:0] div;
  int checks = 0, failures = 0;

  signal_generator #(.OSC_DIV(OSC_DIV)) dut (.clk, .rst_n, .on, .sel, .ext_clk, .step, .div);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    on = 1;
    for (int s = 1; s < 8; s++) begin
      int period, last, n, t;
      bit ok;
      period = OSC_DIV * (1 << (s + 1));
      last = -1; n = 0; t = 0; ok = 1;
      @(negedge clk); sel = 3'(s);
      repeat (2 * period) @(negedge clk);
      while (n < 4) begin
        @(negedge clk); t++;
        if (step) begin
          if (last >= 0 && t - last != period) ok = 0;
          last = t; n++;
        end
      end
      ck(ok, $sformatf("period sel=%0d", s));
    end
    // external clock
    @(negedge clk); sel = 3'd0;
    begin
      int n;
      n = 0;
      repeat (10) begin
        repeat (7) begin @(negedge clk); if (step) n++; end
        ext_clk = ~ext_clk;
      end
      ck(n == 5, $sformatf("ext steps %0d", n));
    end
    // off
    @(negedge clk); sel = 3'd1; on = 0;
    begin
      int n;
      n = 0;
      repeat (40) @(negedge clk);
      repeat (200) begin @(negedge clk); if (step) n++; end
      ck(n == 0, "off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
