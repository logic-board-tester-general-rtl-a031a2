// tb_memory_counter: random loads and up/down steps against a reference model
// of the bounded address counter; also runs one full BEGIN..END loop and checks
// its length in steps.
module tb_memory_counter;
  logic clk = 0, rst_n = 0;
  logic load = 0, step = 0, up = 1, at_end;
  logic [9:0] begin_in = '0, end_in = '0, addr, begin_q, end_q;
  int m_addr, m_b, m_e;
  int checks = 0, failures = 0;

  memory_counter #(.AW(10)) dut (.clk, .rst_n, .load, .begin_in, .end_in, .step, .up,
                                 .addr, .begin_q, .end_q, .at_end);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what);
    checks++;
    if (addr !== 10'(m_addr) || begin_q !== 10'(m_b) || end_q !== 10'(m_e)) begin
      failures++; $display("ERR %s addr=%0d exp %0d", what, addr, m_addr);
    end
  endtask

  initial begin
    m_addr = 0; m_b = 0; m_e = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // one loop 0x010..0x01F: 16 steps return to BEGIN
    @(negedge clk); begin_in = 10'h010; end_in = 10'h01F; load = 1;
    @(negedge clk); load = 0; m_addr = 'h10; m_b = 'h10; m_e = 'h1F; chk("load");
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); step = 1; up = 1;
      @(negedge clk); step = 0;
    end
    chk("loop");
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      load = $urandom_range(0, 50) == 0;
      step = 1'($urandom);
      up   = $urandom_range(0, 3) != 0;
      begin_in = 10'($urandom_range(0, 1023));
      end_in   = 10'($urandom_range(0, 1023));
      if (load) begin m_b = begin_in; m_e = end_in; m_addr = begin_in; end
      else if (step) begin
        if (up) m_addr = (m_addr == m_e) ? m_b : (m_addr + 1) % 1024;
        else    m_addr = (m_addr + 1023) % 1024;
      end
      @(posedge clk); #1; chk("rand");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
