// dl_ms_rx: mobile-terminal downlink receiver.
//
// Chain: fs/4 I/Q down-conversion -> half-band filter and decimation by 2 per
// branch (16384 ksps, 4 samples per chip) -> complex mixer driven by the NCO
// (frequency adjust) -> matched RRC filter per branch -> chip timing selection
// and decimation by 4 -> code/symbol acquisition on the cell Gold code ->
// despreading of the pilot and of the user's channels -> channel estimation
// from the pilot, FED closing the frequency loop through the NCO, coherent
// QPSK decision and channel unmapping. The order of the blocks follows the
// document's block diagram; the algorithms inside the named-only blocks are
// this design's own (see each module).
// Interface: one IF sample per 'if_stb' (at most one every 4 clocks);
// 'walsh' and 'n_ch' select the user's channels. 'data_valid' marks a
// received data word, one per symbol once 'locked'.
module dl_ms_rx
  import cdma_pkg::*;
#(
  parameter int TH_SH   = 2,
  parameter int FED_SH  = 20,
  parameter bit FED_ON  = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   if_stb,
  input  logic signed [IF_W-1:0] if_in,
  input  logic [6:0]             walsh [N_CH],
  input  logic [2:0]             n_ch,
  output logic                   locked,
  output logic                   data_valid,
  output logic [2*N_CH-1:0]      data,
  output logic signed [19:0]     h_re,
  output logic signed [19:0]     h_im,
  output logic signed [23:0]     freq,
  output logic [1:0]             chip_phase,
  output logic                   slip_evt
);
  logic dv;
  logic signed [IF_W-1:0] di, dq;
  logic hv_i, hv_q;
  logic signed [RX_W-1:0] hi, hq, mi, mq, fi, fq;
  logic mv, fv_i, fv_q;
  logic signed [9:0] nco_c, nco_s;
  rx_cplx_t mf_out, chip;
  logic chip_valid, chip_en, pn, sym_end;
  logic [6:0] pos;
  logic sym_valid, bits_valid;
  logic signed [19:0] p_re, p_im;
  logic [2*N_CH-1:0] bits;
  logic signed [40:0] z_re [N_CH], z_im [N_CH];
  logic signed [40:0] fed_err;
  logic signed [23:0] fed_freq;
  logic h_valid;

  iq_demod_fs4 u_iq (.clk, .rst_n, .in_valid(if_stb), .x(if_in), .out_valid(dv), .i_out(di), .q_out(dq));

  hb_decim_fir u_hb_i (.clk, .rst_n, .in_valid(dv), .x(di), .y(hi), .y_valid(hv_i));
  hb_decim_fir u_hb_q (.clk, .rst_n, .in_valid(dv), .x(dq), .y(hq), .y_valid(hv_q));

  assign freq = FED_ON ? fed_freq : '0;
  nco u_nco (.clk, .rst_n, .en(hv_i), .freq, .cos_o(nco_c), .sin_o(nco_s));
  cplx_mixer #(.W(RX_W)) u_mix (.clk, .rst_n, .in_valid(hv_i && hv_q), .i_in(hi), .q_in(hq),
    .cos_i(nco_c), .sin_i(nco_s), .out_valid(mv), .i_out(mi), .q_out(mq));

  mf_fir u_mf_i (.clk, .rst_n, .in_valid(mv), .x(mi), .y(fi), .y_valid(fv_i));
  mf_fir u_mf_q (.clk, .rst_n, .in_valid(mv), .x(mq), .y(fq), .y_valid(fv_q));
  assign mf_out = '{re: fi, im: fq};

  chip_sync u_cs (.clk, .rst_n, .in_valid(fv_i && fv_q), .x(mf_out), .chip_valid, .chip,
    .phase_sel(chip_phase));

  code_acq #(.SF(DL_SF), .TH_SH(TH_SH)) u_acq (.clk, .rst_n, .chip_valid, .chip, .locked, .pos, .pn,
    .sym_end, .chip_en, .slip_evt);

  cdma_demod #(.SF(DL_SF), .N_CH(N_CH), .PILOT(1'b1)) u_dem (.clk, .rst_n, .chip_en, .chip, .pos,
    .pn, .sym_end, .walsh, .h_re, .h_im, .sym_valid, .p_re, .p_im, .bits_valid, .bits, .z_re, .z_im);

  channel_estimator #(.W(20)) u_ce (.clk, .rst_n, .clear(!locked), .p_valid(sym_valid), .p_re, .p_im,
    .h_re, .h_im, .h_valid);

  fed #(.W(20), .FW(24), .GAIN_SH(FED_SH)) u_fed (.clk, .rst_n, .enable(locked && FED_ON),
    .p_valid(sym_valid), .p_re, .p_im, .err(fed_err), .freq(fed_freq));

  channel_unmap #(.N_CH(N_CH)) u_unmap (.clk, .rst_n, .in_valid(bits_valid && locked && h_valid),
    .bits, .n_ch, .out_valid(data_valid), .data);
endmodule
