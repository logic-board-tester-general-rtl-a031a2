// tb_channel_ram: writes a random pattern to every word of a 1024 x 1 channel
// RAM, reads it all back against a reference array, then rewrites a few words
// and checks that neighbours are untouched.
module tb_channel_ram;
  localparam int DEPTH = 1024;
  logic clk = 0, we = 0, din = 0, dout;
  logic [9:0] addr = '0;
  bit   ref_mem [DEPTH];
  int   checks = 0, failures = 0;

  channel_ram #(.DEPTH(DEPTH)) dut (.clk, .addr, .we, .din, .dout);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input bit d);
    @(negedge clk); addr = 10'(a); din = d; we = 1;
    @(negedge clk); we = 0;
    ref_mem[a] = d;
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) wr(a, 1'($urandom));
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); addr = 10'(a); #1;
      checks++; if (dout !== ref_mem[a]) begin failures++; $display("ERR a=%0d", a); end
    end
    for (int i = 0; i < 50; i++) begin
      int a;
      a = $urandom_range(1, DEPTH - 2);
      wr(a, ~ref_mem[a]);
      for (int k = -1; k <= 1; k++) begin
        @(negedge clk); addr = 10'(a + k); #1;
        checks++; if (dout !== ref_mem[a + k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
