// cursor_counter: the CHANNEL SELECT CURSOR counter and its 1-of-N decoder.
//
// A 7-bit (128-count) counter selects one channel; the decoder raises sel[c]
// for the channel under the cursor.  Stepping up, the counter advances and,
// past the last fitted channel (n_active - 1), loads load_val (normally 0), so
// the cursor cycles through the fitted channels only; fewer than N_CH channels
// may be fitted.  Stepping down "homes" the cursor: it alternates between 0 and
// n_active (a position outside the field, so no channel is lit).  ld loads
// load_val directly (microcomputer).  Synchronous.
module cursor_counter #(
  parameter int unsigned N_CH = 120
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [6:0]      n_active,
  input  logic            step,
  input  logic            up,
  input  logic            ld,
  input  logic [6:0]      load_val,
  output logic [6:0]      cnt,
  output logic [N_CH-1:0] sel
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (ld)   cnt <= load_val;
    else if (step) begin
      if (up) cnt <= (cnt >= n_active - 7'd1) ? load_val : cnt + 7'd1;
      else    cnt <= (cnt == 7'd0) ? n_active : 7'd0;
    end
  end

  always_comb
    for (int c = 0; c < N_CH; c++)
      sel[c] = (cnt == 7'(c)) && (7'(c) < n_active);
endmodule
