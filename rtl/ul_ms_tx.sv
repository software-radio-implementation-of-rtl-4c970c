// ul_ms_tx: mobile-terminal uplink transmitter.
//
// A multiplexer puts one bit per symbol on each QPSK branch: the I branch
// always carries traffic bit a; the Q branch carries traffic bit b, or the
// control bit when 'ctl_sel' is set. Both branches are spread by the mobile's
// Gold code at 4096 kchip/s with UL_SF = 32 chips per bit (128 kb/s per
// branch, 256 kb/s in all), scaled to +-AMP, rotated by the NCO for transmit
// frequency adjustment, shaped by two RRC interpolating filters and
// translated to the 8192 kHz IF. The document places the NCO together with
// the I/Q stage after the filters; this design applies the rotation at chip
// rate before shaping, which for the small offsets of a frequency correction
// gives the same spectrum and lets the fs/4 stage stay multiplier-free. The
// multiplexing rule, AMP and the code seeds are also this design's choices.
// Interface: 'sym_start' marks the chip strobe of chip 0 of a symbol, when
// bit_a, bit_b and ctl must be valid. 'freq' is the NCO phase increment per
// chip (2^24 = one turn).
module ul_ms_tx
  import cdma_pkg::*;
#(
  parameter int         AMP      = 64,
  parameter int         IF_SHIFT = 7,
  parameter logic [6:0] SEED_A   = 7'h01,
  parameter logic [6:0] SEED_B   = 7'h10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   chip_stb,
  input  logic                   if_stb,
  input  logic                   bit_a,
  input  logic                   bit_b,
  input  logic                   ctl,
  input  logic                   ctl_sel,
  input  logic signed [23:0]     freq,
  output logic                   sym_start,
  output logic signed [IF_W-1:0] if_out
);
  logic pn, bi, bq, bi_q, bq_q;
  logic [4:0] pos;
  logic signed [9:0] nco_c, nco_s;
  logic signed [CHIP_W-1:0] ci, cq, ri, rq;
  logic rv;
  logic signed [CHIP_W+12:0] yi, yq;
  logic yi_v, yq_v;
  logic [1:0] yi_p, yq_p;

  gold_gen #(.PERIOD(UL_SF), .SEED_A(SEED_A), .SEED_B(SEED_B)) u_code (
    .clk, .rst_n, .en(chip_stb), .restart(1'b0), .chip(pn), .pos(pos));
  assign sym_start = chip_stb && pos == 5'd0;

  // MUX: bits held for the symbol
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin bi_q <= 1'b0; bq_q <= 1'b0; end
    else if (sym_start) begin bi_q <= bit_a; bq_q <= ctl_sel ? ctl : bit_b; end
  assign bi = (pos == 5'd0) ? bit_a : bi_q;
  assign bq = (pos == 5'd0) ? (ctl_sel ? ctl : bit_b) : bq_q;

  // Gold spreading
  assign ci = (bi ^ pn) ? CHIP_W'(-AMP) : CHIP_W'(AMP);
  assign cq = (bq ^ pn) ? CHIP_W'(-AMP) : CHIP_W'(AMP);

  nco u_nco (.clk, .rst_n, .en(chip_stb), .freq, .cos_o(nco_c), .sin_o(nco_s));
  cplx_mixer #(.W(CHIP_W), .DIR(1'b1)) u_rot (.clk, .rst_n, .in_valid(chip_stb), .i_in(ci), .q_in(cq),
    .cos_i(nco_c), .sin_i(nco_s), .out_valid(rv), .i_out(ri), .q_out(rq));

  rrc_interp_fir #(.PHASE_OFS(0)) u_rrc_i (.clk, .rst_n, .in_valid(rv), .x(ri),
    .cw_en(1'b0), .cw_side(1'b0), .cw_addr('0), .cw_data('0), .y(yi), .y_valid(yi_v), .y_phase(yi_p));
  rrc_interp_fir #(.PHASE_OFS(1)) u_rrc_q (.clk, .rst_n, .in_valid(rv), .x(rq),
    .cw_en(1'b0), .cw_side(1'b0), .cw_addr('0), .cw_data('0), .y(yq), .y_valid(yq_v), .y_phase(yq_p));

  iq_mod_fs4 #(.AW(CHIP_W + 13), .SHIFT(IF_SHIFT)) u_iq (.clk, .rst_n, .chip_stb, .if_stb,
    .i_valid(yi_v), .i_phase(yi_p), .i_data(yi), .q_valid(yq_v), .q_phase(yq_p), .q_data(yq),
    .if_out);
endmodule
