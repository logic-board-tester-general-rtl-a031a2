// tb_channel_function_rom: reads all 32 addresses of the channel function ROM
// and compares them with the programmed table, written out here as binary.
module tb_channel_function_rom;
  logic [4:0] addr;
  logic [7:0] code;
  logic [7:0] expect_tab [32];
  int checks = 0, failures = 0;

  channel_function_rom dut (.addr, .code);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (expect_tab[i]) expect_tab[i] = 8'b0000_0000;
    expect_tab[5'h00] = 8'b1001_0110;
    expect_tab[5'h02] = 8'b1100_1101;
    expect_tab[5'h03] = 8'b1010_1000;
    expect_tab[5'h06] = 8'b1110_1000;
    expect_tab[5'h08] = 8'b0111_1010;
    expect_tab[5'h0A] = 8'b1000_1100;
    expect_tab[5'h0E] = 8'b0101_0000;
    expect_tab[5'h10] = 8'b1111_1010;
    expect_tab[5'h12] = 8'b0101_0000;
    expect_tab[5'h16] = 8'b1000_1100;
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a); #1;
      checks++;
      if (code !== expect_tab[a]) begin
        failures++; $display("ERR addr %h: %h expected %h", a, code, expect_tab[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
