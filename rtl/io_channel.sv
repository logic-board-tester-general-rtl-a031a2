// io_channel: one programmable I/O channel of the tester.
//
// The channel's data bus is a loop from the RAM output back to the RAM input.
// The RAM output feeds the display and the memory latch; the latch is clocked by
// ctrl.lat_stb once the RAM has settled after an address change, and it is the
// value an OUTPUT channel drives onto its I/O line and the expected value an
// INPUT or OUTPUT channel compares with the line.  What the channel does is set
// by the word its channel function ROM returns for
//   {INPUT or WRITE flag, OUTPUT and not WRITE flag, ctrl.cfr_a}:
//   RECORD  write the I/O line into RAM on ctrl.wr_stb; trigger on the I/O line
//   SEARCH  compare the latched memory bit with BIT for a search
//   COPY    write the latch back into RAM on ctrl.wr_stb
//   OUTPUT  drive the latch onto the I/O line and compare the line with it
//   INPUT   compare the I/O line with the latch
//   WRITE   write the BIT line (for the cursor channel) or a 1 (scratchpad
//           assignment / other INPUT channels) on ctrl.wr_stb
//   IDLE, INHIBIT, unprogrammed: no write, no compare.
// The PROM word to function map follows the function column of the PROM table;
// which hardware buffer each bit of the word enables is not known, so the
// channel decodes whole words.  INHIBIT and WRITE leave an OUTPUT channel
// driving, as the operating notes say outputs are unaffected by editing.
//
// mismatch is combinational and valid while ctrl.cmp_en is high; it is the
// channel's share of the board comparator.  trig_en / trig_hit report a
// TRIGGER-marked channel and whether its data equals BIT.  The glitch capture
// latch takes the I/O line on glitch_clk, a snapshot taken in every
// channel at the instant any channel mismatches.
module io_channel
  import lbt_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  chan_ctrl_t    ctrl,
  input  logic          glitch_clk, // glitch capture latch clock, all channels at once
  input  logic          sel,       // channel select cursor
  input  logic [AW-1:0] addr,
  input  logic          io_in,     // level seen on the I/O pin
  output logic          io_out,
  output logic          io_oe,
  output logic          mismatch,
  output logic          trig_en,
  output logic          trig_hit,
  output logic          mem_out,   // RAM output, also the line to the microcomputer
  output logic [7:0]    cfr_code,
  output chreg_t        creg,
  output ch_led_t       led
);
  logic     j;
  logic     dout, latch, glitch, din, we;
  logic [4:0] cfr_addr;
  wr_src_e  wr_src;
  trg_src_e trg_src;
  logic     drive, cmp_io;

  channel_register u_reg (
    .clk, .rst_n, .sel,
    .clr_all (ctrl.clr_all),
    .enter   (ctrl.enter),
    .set_in  (ctrl.set_in),
    .set_out (ctrl.set_out),
    .j_set   (ctrl.j_set),
    .j_clr   (ctrl.j_clr),
    .bit_in  (ctrl.edit_bit),
    .trig_in (ctrl.edit_trig),
    .q       (creg),
    .j       (j)
  );

  assign cfr_addr = {creg.inp | j, creg.outp & ~j, ctrl.cfr_a};

  channel_function_rom u_cfr (.addr(cfr_addr), .code(cfr_code));

  always_comb begin
    wr_src  = WR_NONE;
    trg_src = TRG_NONE;
    drive   = 1'b0;
    cmp_io  = 1'b0;
    unique case (cfr_code)
      CFR_RECORD:  begin wr_src = WR_IO; trg_src = TRG_IO; end
      CFR_SEARCH:  trg_src = TRG_MEM;
      CFR_COPY:    wr_src = WR_LATCH;
      CFR_OUTPUT:  begin drive = 1'b1; cmp_io = 1'b1; end
      CFR_INPUT:   cmp_io = 1'b1;
      CFR_WRITE:   begin wr_src = WR_EDIT; drive = creg.outp; end
      CFR_INHIBIT: drive = creg.outp;
      default:     ;
    endcase
  end

  always_comb begin
    unique case (wr_src)
      WR_IO:    din = io_in;
      WR_LATCH: din = latch;
      WR_EDIT:  din = j ? ctrl.edit_bit : 1'b1;
      default:  din = 1'b0;
    endcase
  end
  assign we = ctrl.wr_stb && (wr_src != WR_NONE);

  channel_ram #(.DEPTH(DEPTH), .AW(AW)) u_ram (.clk, .addr, .we, .din, .dout);

  // Memory latch and glitch capture latch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch  <= 1'b0;
      glitch <= 1'b0;
    end else begin
      if (ctrl.lat_stb)    latch  <= dout;
      if (glitch_clk) glitch <= io_in;
    end
  end

  assign io_out   = latch;
  assign io_oe    = drive;
  assign mismatch = ctrl.cmp_en && cmp_io && (io_in != latch);
  assign trig_en  = creg.trig && (trg_src != TRG_NONE);
  assign trig_hit = ((trg_src == TRG_IO) ? io_in : latch) == creg.bit_v;
  assign mem_out  = dout;

  display_mux u_disp (
    .sel (ctrl.disp_sel), .cursor(sel), .creg, .memory(dout), .glitch, .led
  );
endmodule
