// master_control: the master register and the channel command strobes.
//
// Master register.  RECORD, SEARCH, COPY and WRITE each enter their own flag
// and clear the previous one.  INPUT and OUTPUT put the tester in BOARD TEST
// (bt); while bt is set no other button enters the register, and only RECORD
// leaves it.  RECORD also clears every channel register (clr_all).
//
// CFR address bits sent to every channel (ctrl.cfr_a):
//   RECORD 000, SEARCH 010, COPY 010 (011 while COPY is held), WRITE 110;
//   the WRITE button adds 110 while held, in any mode; INPUT and OUTPUT add
//   110 / 010 for the one cycle of their scratchpad write.
//
// Button actions (buttons are debounced, synchronous levels):
//   ENTER   one-cycle ctrl.enter (BIT/TRIGGER into the cursor channel) and
//           prng_init.  With BIT off and TRIGGER on, the data bit is the
//           generator output (the document's OR of the generator into the BIT
//           path), except in the ENTER cycle itself, where the generator is
//           being initialised and a plain 0 is entered, so that a trigger on
//           0 can be marked (this design's choice).
//   INPUT / OUTPUT  cycle 0: set_in / set_out to the cursor channel, bt set;
//           cycle 1: a write strobe with 110 / 010 on cfr_a, so every INPUT
//           (OUTPUT) channel writes a 1 at the current, scratchpad address.
//   WRITE   cycle 0: j_set to the cursor channel and delay_start (start the
//           DELAY countdown); cycle 1: a write strobe.  Memory steps while
//           held write further words.  Release: j_clr.
//   COPY    press: one latch strobe takes the current word; steps do not clock
//           the latch or write while held.  Release: one write strobe, with
//           CFR bit 0 kept for that cycle, puts the word at the new address.
// Step strobes from the delay line (seq_lat, seq_cmp) become ctrl.lat_stb and
// ctrl.wr_stb unless the step came from the MEMORY SWEEP toggle turned left
// (reverse sweep executes nothing: inputs and outputs stay frozen) or COPY is
// held.  Forward sweep steps execute like generator steps, so recording may be
// clocked by hand.  To look through memory without recording, the WRITE flag
// (CFR address 6, no channel writes) is used.  The comparator window
// (ctrl.cmp_en) follows cmp_open.
module master_control
  import lbt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       record_btn,
  input  logic       search_btn,
  input  logic       copy_btn,
  input  logic       write_btn,
  input  logic       input_btn,
  input  logic       output_btn,
  input  logic       enter_btn,
  input  logic       bit_sw,
  input  logic       trig_sw,
  input  logic       disp_sw,
  input  logic       prng_q,
  // current memory step
  input  logic       step_ok,
  input  logic       step_manual,   // step came from the MEMORY SWEEP toggle
  input  logic       step_up,
  input  logic       seq_lat,
  input  logic       seq_cmp,
  input  logic       cmp_open,
  output chan_ctrl_t ctrl,
  output flag_e      flag,
  output logic       bt,
  output logic       prng_init,
  output logic       delay_start
);
  logic rec_d, srch_d, copy_d, wr_d, in_d, out_d, ent_d;
  logic rec_r, srch_r, copy_r, copy_f, wr_r, wr_f, in_r, out_r, ent_r;
  logic in_stroke, out_stroke, wr_stroke;
  logic man_q, up_q, inhibit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {rec_d, srch_d, copy_d, wr_d, in_d, out_d, ent_d} <= '0;
    end else begin
      {rec_d, srch_d, copy_d, wr_d, in_d, out_d, ent_d} <=
        {record_btn, search_btn, copy_btn, write_btn, input_btn, output_btn, enter_btn};
    end
  end

  assign rec_r  = record_btn && !rec_d;
  assign srch_r = search_btn && !srch_d;
  assign copy_r = copy_btn && !copy_d;
  assign copy_f = !copy_btn && copy_d;
  assign wr_r   = write_btn && !wr_d;
  assign wr_f   = !write_btn && wr_d;
  assign in_r   = input_btn && !in_d;
  assign out_r  = output_btn && !out_d;
  assign ent_r  = enter_btn && !ent_d;

  // Master register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag <= F_RECORD;
      bt   <= 1'b0;
    end else if (rec_r) begin
      flag <= F_RECORD;
      bt   <= 1'b0;
    end else if (in_r || out_r) begin
      flag <= F_RECORD;
      bt   <= 1'b1;
    end else if (!bt) begin
      if (srch_r)      flag <= F_SEARCH;
      else if (copy_r) flag <= F_COPY;
      else if (wr_r)   flag <= F_WRITE;
    end
  end

  // One-cycle follow-up strokes and the source of the current step.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_stroke  <= 1'b0;
      out_stroke <= 1'b0;
      wr_stroke  <= 1'b0;
      man_q      <= 1'b0;
      up_q       <= 1'b1;
    end else begin
      in_stroke  <= in_r && !rec_r;
      out_stroke <= out_r && !in_r && !rec_r;
      wr_stroke  <= wr_r;
      if (step_ok) begin
        man_q <= step_manual;
        up_q  <= step_up;
      end
    end
  end

  assign inhibit = (man_q && !up_q) || copy_btn;

  always_comb begin
    logic [2:0] a;
    unique case (flag)
      F_SEARCH: a = 3'b010;
      F_COPY:   a = 3'b010;
      F_WRITE:  a = 3'b110;
      default:  a = 3'b000;
    endcase
    if (flag == F_COPY && (copy_btn || copy_d)) a[0] = 1'b1;
    if (write_btn || wr_d)                      a = a | 3'b110;
    if (in_stroke)                              a = a | 3'b110;
    if (out_stroke)                             a = a | 3'b010;

    ctrl            = '0;
    ctrl.cfr_a      = a;
    ctrl.lat_stb    = (seq_lat && !inhibit) || (copy_r && !bt);
    ctrl.wr_stb     = (seq_cmp && !inhibit) || in_stroke || out_stroke || wr_stroke
                      || (copy_f && flag == F_COPY);
    ctrl.cmp_en     = cmp_open;
    ctrl.edit_bit   = bit_sw || (trig_sw && prng_q && !ent_r);
    ctrl.edit_trig  = trig_sw;
    ctrl.enter      = ent_r;
    ctrl.set_in     = in_r;
    ctrl.set_out    = out_r && !in_r;
    ctrl.j_set      = wr_r;
    ctrl.j_clr      = wr_f;
    ctrl.clr_all    = rec_r;
    ctrl.disp_sel   = disp_sw;
  end

  assign prng_init   = ent_r;
  assign delay_start = wr_r;
endmodule
