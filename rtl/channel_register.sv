// channel_register: the 4-bit command register of one I/O channel, plus the
// WRITE flag (the "J" input of the document's channel register).
//
// Strobes act only when the channel is under the cursor (sel):
//   enter   loads BIT and TRIGGER from the panel switches and clears INPUT and
//           OUTPUT (ENTER with both switches off turns the channel back into a
//           recorder);
//   set_in  / set_out make the channel an INPUT or an OUTPUT (the other cleared);
//   j_set   loads BIT and sets the WRITE flag, j_clr clears the flag.
// clr_all (RECORD button) and reset clear every channel regardless of sel.
// The behaviour of ENTER on INPUT/OUTPUT and of one button on the other bit is
// this design's reading of the operating instructions.  All updates are on the
// clock edge.
module channel_register
  import lbt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sel,
  input  logic   clr_all,
  input  logic   enter,
  input  logic   set_in,
  input  logic   set_out,
  input  logic   j_set,
  input  logic   j_clr,
  input  logic   bit_in,
  input  logic   trig_in,
  output chreg_t q,
  output logic   j
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
      j <= 1'b0;
    end else if (clr_all) begin
      q <= '0;
      j <= 1'b0;
    end else if (sel) begin
      if (enter) begin
        q <= '{bit_v: bit_in, trig: trig_in, inp: 1'b0, outp: 1'b0};
      end else if (set_in) begin
        q.inp  <= 1'b1;
        q.outp <= 1'b0;
      end else if (set_out) begin
        q.outp <= 1'b1;
        q.inp  <= 1'b0;
      end
      if (j_set) begin
        j       <= 1'b1;
        q.bit_v <= bit_in;
      end else if (j_clr) begin
        j <= 1'b0;
      end
    end else if (j_clr) begin
      j <= 1'b0;
    end
  end
endmodule
