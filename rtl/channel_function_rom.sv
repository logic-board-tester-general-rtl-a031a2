// channel_function_rom: the 32 x 8 channel function PROM (CFR) of one channel.
//
// Address bits: 0 COPY button held, 1 COPY/SEARCH/WRITE flag, 2 WRITE,
// 3 channel is OUTPUT, 4 channel is INPUT.  The contents are the programmed
// words of the tester's PROM table; every address not listed there reads 00.
// Purely combinational.
module channel_function_rom
  import lbt_pkg::*;
(
  input  logic [4:0] addr,
  output logic [7:0] code
);
  always_comb begin
    unique case (addr)
      5'h00:          code = CFR_RECORD;
      5'h02:          code = CFR_SEARCH;
      5'h03:          code = CFR_COPY;
      5'h06:          code = CFR_IDLE;
      5'h08:          code = CFR_OUTPUT;
      5'h0A:          code = CFR_WRITE;
      5'h0E:          code = CFR_INHIBIT;
      5'h10:          code = CFR_INPUT;
      5'h12:          code = CFR_INHIBIT;
      5'h16:          code = CFR_WRITE;
      default:        code = CFR_NONE;
    endcase
  end
endmodule
