// tb_cursor_counter: the cursor must cycle through 0..N_ACTIVE-1 stepping up
// with exactly one select line high, home alternately on 0 and N_ACTIVE (no
// line high) stepping down, and load a value directly.  Uses 120 channels
// with 117 fitted.
module tb_cursor_counter;
  localparam int N = 120, NA = 117;
  logic clk = 0, rst_n = 0, step = 0, up = 1, ld = 0;
  logic [6:0] load_val = '0, cnt;
  logic [N-1:0] sel;
  int checks = 0, failures = 0;

  cursor_counter #(.N_CH(N)) dut (.clk, .rst_n, .n_active(7'(NA)), .step, .up, .ld,
                                  .load_val, .cnt, .sel);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s cnt=%0d", s, cnt); end
  endtask
  task automatic pulse(bit u);
    @(negedge clk); step = 1; up = u; @(negedge clk); step = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 2 * NA + 5; i++) begin
      ck(cnt == 7'(i % NA), "up count");
      ck(sel == (N'(1) << (i % NA)), "one-hot");
      pulse(1);
    end
    pulse(0); ck(cnt == 0, "home 0");
    pulse(0); ck(cnt == NA && sel == '0, "home NA");
    pulse(0); ck(cnt == 0 && sel[0], "home 0 again");
    @(negedge clk); ld = 1; load_val = 7'd55; @(negedge clk); ld = 0;
    ck(cnt == 55 && sel[55], "load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
