// strobe_sequencer: the tapped delay line behind each memory step, in clock
// cycles.  One clock cycle stands for one 25 ns tap.
//
// A start pulse (an accepted memory step) travels down the line.  SETTLE cycles
// later lat_stb pulses: the RAM has settled at the new address and the memory
// latch is clocked.  CMP_DLY cycles after that cmp_stb pulses and cmp_open
// rises: the board under test has had time to answer, the comparators are
// strobed, and recorders write.  cmp_open stays high until the next start, so a
// glitch anywhere in the rest of the step is still seen.  kill drops any pulse
// in the line and closes the window (halt).  The defaults, 2 taps (50 ns) of
// RAM settling and 8 taps (200 ns) from counter clock to compare, are the
// document's numbers.  The line holds one step at a time; a start during a
// pulse restarts it.
module strobe_sequencer #(
  parameter int unsigned SETTLE  = 2,
  parameter int unsigned CMP_DLY = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic kill,
  output logic lat_stb,
  output logic cmp_stb,
  output logic cmp_open,
  output logic busy
);
  localparam int unsigned TOTAL = SETTLE + CMP_DLY;
  localparam int unsigned CW    = $clog2(TOTAL + 2);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      busy     <= 1'b0;
      cmp_open <= 1'b0;
    end else if (kill) begin
      cnt      <= '0;
      busy     <= 1'b0;
      cmp_open <= 1'b0;
    end else if (start) begin
      cnt      <= CW'(1);
      busy     <= 1'b1;
      cmp_open <= 1'b0;
    end else if (busy) begin
      if (cnt == CW'(TOTAL)) begin
        busy     <= 1'b0;
        cmp_open <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign lat_stb = busy && (cnt == CW'(SETTLE));
  assign cmp_stb = busy && (cnt == CW'(TOTAL));
endmodule
