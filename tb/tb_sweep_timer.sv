// tb_sweep_timer: a short press gives exactly one pulse; a long press gives one
// pulse, then after HOLDOFF cycles pulses every 'rate' cycles; dir follows the
// side pressed.
module tb_sweep_timer;
  localparam int HOLDOFF = 20;
  logic clk = 0, rst_n = 0, up_btn = 0, dn_btn = 0, pulse, dir;
  logic [15:0] rate = 16'd7;
  int checks = 0, failures = 0;

  sweep_timer #(.HOLDOFF(HOLDOFF)) dut (.clk, .rst_n, .up_btn, .dn_btn, .rate, .pulse, .dir);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s", s); end
  endtask

  initial begin
    int n, t, times[$];
    repeat (2) @(posedge clk); rst_n = 1;
    // short press, left
    @(negedge clk); dn_btn = 1;
    n = 0;
    repeat (5) begin @(negedge clk); if (pulse) begin n++; ck(dir == 0, "dir down"); end end
    dn_btn = 0;
    repeat (30) begin @(negedge clk); if (pulse) n++; end
    ck(n == 1, $sformatf("single step, %0d pulses", n));
    // long press, right
    @(negedge clk); up_btn = 1; t = 0;
    repeat (HOLDOFF + 6 * 7 + 3) begin
      @(negedge clk); t++;
      if (pulse) begin times.push_back(t); ck(dir == 1, "dir up"); end
    end
    up_btn = 0;
    ck(times.size() == 8, $sformatf("pulses %0d", times.size()));
    if (times.size() >= 3) begin
      ck(times[1] - times[0] == HOLDOFF, $sformatf("holdoff %0d", times[1] - times[0]));
      for (int i = 2; i < times.size(); i++) ck(times[i] - times[i - 1] == 7, "rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
