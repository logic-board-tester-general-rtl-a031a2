// sweep_timer: the MEMORY / CHANNEL SWEEP pulse generator (the 555 circuit).
//
// Pressing the toggle to either side gives one step pulse at once (single
// step).  If the toggle is still held HOLDOFF cycles later, pulses repeat every
// rate cycles (the SWEEP RATE slide) until it is released.  dir reports the
// side held: 1 right (up), 0 left (down).  Both toggles pressed counts as up.
// Pulses are one clock wide; rate values below 1 are treated as 1.
module sweep_timer #(
  parameter int unsigned HOLDOFF = 64,
  parameter int unsigned RW      = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          up_btn,
  input  logic          dn_btn,
  input  logic [RW-1:0] rate,
  output logic          pulse,
  output logic          dir
);
  localparam int unsigned HW = (HOLDOFF > 1) ? $clog2(HOLDOFF + 1) : 1;
  localparam int unsigned CW = (RW > HW) ? RW : HW;

  logic          held, held_d, repeating;
  logic [CW-1:0] cnt;

  assign held = up_btn || dn_btn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_d    <= 1'b0;
      repeating <= 1'b0;
      cnt       <= '0;
      dir       <= 1'b1;
      pulse     <= 1'b0;
    end else begin
      held_d <= held;
      pulse  <= 1'b0;
      if (held) dir <= up_btn;
      if (!held) begin
        repeating <= 1'b0;
        cnt       <= '0;
      end else if (!held_d) begin
        pulse <= 1'b1;
        cnt   <= '0;
      end else if (!repeating) begin
        if (cnt == CW'(HOLDOFF - 1)) begin
          repeating <= 1'b1;
          cnt       <= '0;
          pulse     <= 1'b1;
        end else cnt <= cnt + 1'b1;
      end else begin
        if (cnt + 1'b1 >= CW'(rate)) begin
          cnt   <= '0;
          pulse <= 1'b1;
        end else cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
