// tb_strobe_sequencer: with the default taps (2 + 6), lat_stb must come 2 and
// cmp_stb 8 cycles after start, cmp_open from then to the next start, and kill
// must drop a pulse in flight.
module tb_strobe_sequencer;
  logic clk = 0, rst_n = 0, start = 0, kill = 0;
  logic lat_stb, cmp_stb, cmp_open, busy;
  int checks = 0, failures = 0;
  int t, t_lat, t_cmp, n_lat, n_cmp;

  strobe_sequencer dut (.clk, .rst_n, .start, .kill, .lat_stb, .cmp_stb, .cmp_open, .busy);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic ck(bit c, string s);
    checks++; if (!c) begin failures++; $display("ERR %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 1; t_lat = -1; t_cmp = -1; n_lat = 0; n_cmp = 0;
      ck(!cmp_open, "window closed after start");
      repeat (12) begin
        if (lat_stb) begin t_lat = t; n_lat++; end
        if (cmp_stb) begin t_cmp = t; n_cmp++; end
        @(negedge clk); t++;
      end
      ck(t_lat == 2 && n_lat == 1, $sformatf("lat at %0d", t_lat));
      ck(t_cmp == 8 && n_cmp == 1, $sformatf("cmp at %0d", t_cmp));
      ck(cmp_open, "window open");
    end
    start = 1; @(negedge clk); start = 0; @(negedge clk);
    kill = 1; @(negedge clk); kill = 0;
    n_lat = 0; n_cmp = 0;
    repeat (12) begin if (lat_stb) n_lat++; if (cmp_stb) n_cmp++; @(negedge clk); end
    ck(n_lat == 0 && n_cmp == 0 && !cmp_open, "kill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
