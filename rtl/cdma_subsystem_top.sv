// cdma_subsystem_top: the FPGA part of the indoor DS-CDMA system, both links.
//
// Downlink (base station to mobile): dl_bs_tx spreads up to 16 users with
// Walsh codes and the cell Gold code, adds pilot and broadcast channels,
// shapes and translates to IF; dl_ms_rx is one mobile's receiver.
// Uplink (mobile to base station): ul_ms_tx spreads the mobile's bits with its
// Gold code (SF 32); two ul_bs_rx receivers (two antennas) feed the diversity
// selector and the DeMUX.
// The radio path is analog and outside this design, so each transmitter's IF
// output and each receiver's IF input is a port; a testbench closes the loop.
// One system clock of 131072 kHz is assumed; rate_gen derives the IF and chip
// strobes shared by all blocks. Host configuration (user codes, pre-RAKE
// weights, gains, coefficient RAM writes, NCO word) comes in as plain ports.
module cdma_subsystem_top
  import cdma_pkg::*;
#(
  parameter int N_USERS = cdma_pkg::N_USERS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // downlink transmitter (base station)
  input  logic [2*N_CH-1:0]      dl_user_data [N_USERS],
  input  dl_user_cfg_t           dl_cfg [N_USERS],
  input  logic [1:0]             dl_bpch_bits,
  input  logic                   cw_en,
  input  logic                   cw_q,
  input  logic                   cw_side,
  input  logic [3:0]             cw_addr,
  input  logic signed [9:0]      cw_data,
  output logic                   dl_sym_start,
  output logic signed [IF_W-1:0] dl_if_tx,
  // downlink receiver (mobile)
  input  logic signed [IF_W-1:0] dl_if_rx,
  input  logic [6:0]             ms_walsh [N_CH],
  input  logic [2:0]             ms_n_ch,
  output logic                   dl_locked,
  output logic                   dl_data_valid,
  output logic [2*N_CH-1:0]      dl_data,
  output logic signed [23:0]     dl_freq,
  // uplink transmitter (mobile)
  input  logic                   ul_bit_a,
  input  logic                   ul_bit_b,
  input  logic                   ul_ctl,
  input  logic                   ul_ctl_sel,
  input  logic signed [23:0]     ul_freq,
  output logic                   ul_sym_start,
  output logic signed [IF_W-1:0] ul_if_tx,
  // uplink receivers (base station, two antennas)
  input  logic signed [IF_W-1:0] ul_if_rx_a,
  input  logic signed [IF_W-1:0] ul_if_rx_b,
  input  logic                   bs_ctl_sel,
  output logic                   ul_locked_a,
  output logic                   ul_locked_b,
  output logic                   ul_valid,
  output logic                   ul_rx_bit_a,
  output logic                   ul_rx_bit_b,
  output logic                   ul_rx_ctl_valid,
  output logic                   ul_rx_ctl,
  output logic                   ul_sel_b
);
  logic if_stb, rx_stb, chip_stb;
  logic signed [CHIP_W-1:0] sum_i, sum_q;
  logic signed [19:0] h_re, h_im;
  logic [1:0] chip_phase;
  logic dl_slip;
  logic va, vb, sa, sb, dv;
  logic [1:0] ba, bb, dbits;
  logic signed [36:0] za_re, za_im, zb_re, zb_im;

  rate_gen u_rate (.clk, .rst_n, .if_stb, .rx_stb, .chip_stb);

  dl_bs_tx #(.N_USERS(N_USERS), .IF_SHIFT(7)) u_dl_tx (.clk, .rst_n, .chip_stb, .if_stb,
    .user_data(dl_user_data), .cfg(dl_cfg), .bpch_bits(dl_bpch_bits), .cw_en, .cw_q, .cw_side,
    .cw_addr, .cw_data, .sym_start(dl_sym_start), .sum_i, .sum_q, .if_out(dl_if_tx));

  dl_ms_rx u_dl_rx (.clk, .rst_n, .if_stb, .if_in(dl_if_rx), .walsh(ms_walsh), .n_ch(ms_n_ch),
    .locked(dl_locked), .data_valid(dl_data_valid), .data(dl_data), .h_re, .h_im, .freq(dl_freq),
    .chip_phase, .slip_evt(dl_slip));

  ul_ms_tx u_ul_tx (.clk, .rst_n, .chip_stb, .if_stb, .bit_a(ul_bit_a), .bit_b(ul_bit_b),
    .ctl(ul_ctl), .ctl_sel(ul_ctl_sel), .freq(ul_freq), .sym_start(ul_sym_start), .if_out(ul_if_tx));

  ul_bs_rx u_ul_rx_a (.clk, .rst_n, .if_stb, .if_in(ul_if_rx_a), .locked(ul_locked_a),
    .sym_valid(va), .bits(ba), .z_re(za_re), .z_im(za_im), .slip_evt(sa));
  ul_bs_rx u_ul_rx_b (.clk, .rst_n, .if_stb, .if_in(ul_if_rx_b), .locked(ul_locked_b),
    .sym_valid(vb), .bits(bb), .z_re(zb_re), .z_im(zb_im), .slip_evt(sb));

  diversity_select #(.ZW(37)) u_div (.clk, .rst_n, .a_valid(va), .a_locked(ul_locked_a),
    .a_re(za_re), .a_im(za_im), .b_valid(vb), .b_locked(ul_locked_b), .b_re(zb_re), .b_im(zb_im),
    .out_valid(dv), .bits(dbits), .sel_b(ul_sel_b));

  ul_demux u_demux (.clk, .rst_n, .in_valid(dv), .bits(dbits), .ctl_sel(bs_ctl_sel),
    .out_valid(ul_valid), .bit_a(ul_rx_bit_a), .bit_b(ul_rx_bit_b), .ctl_valid(ul_rx_ctl_valid),
    .ctl(ul_rx_ctl));
endmodule
