// ul_bs_rx: base-station uplink receiver for one user and one antenna.
//
// Chain: fs/4 I/Q down-conversion and half-band decimation (16384 ksps),
// matched RRC filter per branch, chip timing and decimation by 4, serial-search
// acquisition of the user's Gold code (the uplink is asynchronous, so the base
// station must find the code phase) and despreading of the I and Q bits over
// UL_SF = 32 chips. The uplink has no pilot: decisions are the signs of the
// despread I and Q values, and the soft values z go to the diversity
// selector. The document gives the block order; carrier-phase recovery for the
// uplink is not described, so this receiver assumes the phase is aligned.
// The code seeds (01/10) were picked so that the 32-chip code, which repeats
// every symbol, has autocorrelation side lobes of at most 1/4 of the peak; the
// acquisition threshold is therefore 1/2 (TH_SH = 1). Both are this design's
// choices.
// Interface: one IF sample per 'if_stb'; 'sym_valid' marks bits/z.
module ul_bs_rx
  import cdma_pkg::*;
#(
  parameter logic [6:0] SEED_A = 7'h01,
  parameter logic [6:0] SEED_B = 7'h10,
  parameter int         TH_SH  = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   if_stb,
  input  logic signed [IF_W-1:0] if_in,
  output logic                   locked,
  output logic                   sym_valid,
  output logic [1:0]             bits,
  output logic signed [36:0]     z_re,
  output logic signed [36:0]     z_im,
  output logic                   slip_evt
);
  logic dv, hv_i, hv_q, fv_i, fv_q, chip_valid, chip_en, pn, sym_end, sv;
  logic signed [IF_W-1:0] di, dq;
  logic signed [RX_W-1:0] hi, hq, fi, fq;
  rx_cplx_t chip;
  logic [1:0] phase_sel;
  logic [4:0] pos;
  logic [6:0] walsh0 [1];
  logic signed [17:0] p_re, p_im;
  logic signed [36:0] zr [1], zi [1];

  iq_demod_fs4 u_iq (.clk, .rst_n, .in_valid(if_stb), .x(if_in), .out_valid(dv), .i_out(di), .q_out(dq));
  hb_decim_fir u_hb_i (.clk, .rst_n, .in_valid(dv), .x(di), .y(hi), .y_valid(hv_i));
  hb_decim_fir u_hb_q (.clk, .rst_n, .in_valid(dv), .x(dq), .y(hq), .y_valid(hv_q));
  mf_fir u_mf_i (.clk, .rst_n, .in_valid(hv_i), .x(hi), .y(fi), .y_valid(fv_i));
  mf_fir u_mf_q (.clk, .rst_n, .in_valid(hv_q), .x(hq), .y(fq), .y_valid(fv_q));
  chip_sync u_cs (.clk, .rst_n, .in_valid(fv_i && fv_q), .x('{re: fi, im: fq}), .chip_valid, .chip, .phase_sel);
  code_acq #(.SF(UL_SF), .SEED_A(SEED_A), .SEED_B(SEED_B), .TH_SH(TH_SH)) u_acq (.clk, .rst_n,
    .chip_valid, .chip, .locked, .pos, .pn, .sym_end, .chip_en, .slip_evt);

  assign walsh0[0] = 7'd0;
  cdma_demod #(.SF(UL_SF), .N_CH(1), .PILOT(1'b0), .W(18)) u_dem (.clk, .rst_n, .chip_en, .chip,
    .pos, .pn, .sym_end, .walsh(walsh0), .h_re(18'sd0), .h_im(18'sd0), .sym_valid(sv), .p_re, .p_im,
    .bits_valid(sym_valid), .bits, .z_re(zr), .z_im(zi));
  assign z_re = zr[0];
  assign z_im = zi[0];
endmodule
