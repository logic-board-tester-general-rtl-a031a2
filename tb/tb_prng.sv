// tb_prng: the output bit stream must satisfy the recurrence
// b[n] = b[n-31] xor b[n-28] of the primitive trinomial x^31 + x^28 + 1, start
// from the seed after init, and not advance without step.
module tb_prng;
  logic clk = 0, rst_n = 0, init = 0, step = 0, q;
  bit   seq [$];
  int checks = 0, failures = 0;

  localparam logic [30:0] SEED = 31'h1234_5679;
  prng #(.SEED(SEED)) dut (.clk, .rst_n, .init, .step, .q);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    // the first 31 outputs are the seed, top stage first
    for (int i = 0; i < 6000; i++) begin
      seq.push_back(q);
      step = 1; @(negedge clk); step = 0;
      if (i % 7 == 0) begin
        bit hold;
        hold = q;
        @(negedge clk);
        checks++; if (q !== hold) failures++;
      end
    end
    for (int i = 0; i < 31; i++) begin
      checks++; if (seq[i] !== SEED[30 - i]) begin failures++; $display("ERR seed bit %0d", i); end
    end
    for (int n = 31; n < seq.size(); n++) begin
      checks++;
      if (seq[n] !== (seq[n - 31] ^ seq[n - 28])) begin failures++; $display("ERR n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
