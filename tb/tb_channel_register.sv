// tb_channel_register: random strobes against a reference model of the channel
// register (ENTER, INPUT, OUTPUT, WRITE flag, RECORD clear, cursor gating).
module tb_channel_register;
  import lbt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel, clr_all, enter, set_in, set_out, j_set, j_clr, bit_in, trig_in;
  chreg_t q, mq;
  logic j, mj;
  int checks = 0, failures = 0;

  channel_register dut (.clk, .rst_n, .sel, .clr_all, .enter, .set_in, .set_out,
                        .j_set, .j_clr, .bit_in, .trig_in, .q, .j);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {sel, clr_all, enter, set_in, set_out, j_set, j_clr, bit_in, trig_in} = '0;
    mq = '0; mj = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      sel     = $urandom_range(0, 3) != 0;
      clr_all = $urandom_range(0, 30) == 0;
      {enter, set_in, set_out, j_set, j_clr} = 5'(1 << $urandom_range(0, 5));
      bit_in  = 1'($urandom);
      trig_in = 1'($urandom);
      // reference
      if (clr_all) begin mq = '0; mj = 0; end
      else begin
        if (sel && enter) begin mq.bit_v = bit_in; mq.trig = trig_in; mq.inp = 0; mq.outp = 0; end
        else if (sel && set_in)  begin mq.inp = 1; mq.outp = 0; end
        else if (sel && set_out) begin mq.outp = 1; mq.inp = 0; end
        if (sel && j_set) begin mj = 1; mq.bit_v = bit_in; end
        else if (j_clr) mj = 0;
      end
      @(posedge clk); #1;
      checks++;
      if (q !== mq || j !== mj) begin
        failures++; $display("ERR i=%0d q=%b exp %b j=%b exp %b", i, q, mq, j, mj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
