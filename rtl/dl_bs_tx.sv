// dl_bs_tx: base-station downlink transmitter for N_USERS users.
//
// A shared chip position counter and the cell Gold code (gold_gen, reloaded
// every 128-chip symbol) drive N_USERS user slices (dl_user_tx) and the
// pilot/broadcast channels (pich_bpch). Their chips are added per branch and
// saturated to 10 bits, then shaped by two RRC interpolating filters (I: even
// IF phases, Q: odd IF phases) and translated to the 8192 kHz IF by iq_mod_fs4.
// Only the user slices are repeated per user; the adders, filters and IF stage
// are shared, as in the document's block diagram.
// Interface: 'sym_start' is high during the chip strobe of chip 0 of a symbol;
// user_data and bpch_bits must be valid then and are held internally.
// The coefficient port writes either filter (cw_q selects the Q filter).
module dl_bs_tx
  import cdma_pkg::*;
#(
  parameter int N_USERS = 16,
  parameter int IF_SHIFT = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     chip_stb,
  input  logic                     if_stb,
  input  logic [2*N_CH-1:0]        user_data [N_USERS],
  input  dl_user_cfg_t             cfg [N_USERS],
  input  logic [1:0]               bpch_bits,
  input  logic                     cw_en,
  input  logic                     cw_q,
  input  logic                     cw_side,
  input  logic [3:0]               cw_addr,
  input  logic signed [9:0]        cw_data,
  output logic                     sym_start,
  output logic signed [CHIP_W-1:0] sum_i,
  output logic signed [CHIP_W-1:0] sum_q,
  output logic signed [IF_W-1:0]   if_out
);
  localparam int SW = CHIP_W + $clog2(N_USERS + 2);
  logic pn;
  logic [6:0] pos;
  logic signed [CHIP_W-1:0] u_i [N_USERS], u_q [N_USERS];
  logic signed [CHIP_W-1:0] p_i, p_q;
  logic signed [SW-1:0] acc_i, acc_q;
  logic chip_stb_d;
  logic signed [CHIP_W+12:0] yi, yq;
  logic yi_v, yq_v;
  logic [1:0] yi_p, yq_p;

  gold_gen #(.PERIOD(DL_SF)) u_pn (.clk, .rst_n, .en(chip_stb), .restart(1'b0), .chip(pn), .pos(pos));
  assign sym_start = chip_stb && pos == 7'd0;

  for (genvar u = 0; u < N_USERS; u++) begin : g_user
    dl_user_tx u_user (.clk, .rst_n, .chip_stb, .pos, .pn, .data(user_data[u]), .cfg(cfg[u]),
                       .chip_i(u_i[u]), .chip_q(u_q[u]));
  end

  pich_bpch u_pich (.clk, .rst_n, .chip_stb, .pos, .pn, .bpch_bits, .chip_i(p_i), .chip_q(p_q));

  always_comb begin
    acc_i = SW'(p_i);
    acc_q = SW'(p_q);
    for (int u = 0; u < N_USERS; u++) begin
      acc_i = acc_i + SW'(u_i[u]);
      acc_q = acc_q + SW'(u_q[u]);
    end
  end

  function automatic logic signed [CHIP_W-1:0] sat(input logic signed [SW-1:0] v);
    if (v > SW'(511))  return CHIP_W'(511);
    if (v < -SW'(512)) return CHIP_W'(-512);
    return CHIP_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chip_stb_d <= 1'b0;
    else        chip_stb_d <= chip_stb;

  assign sum_i = sat(acc_i);
  assign sum_q = sat(acc_q);

  rrc_interp_fir #(.PHASE_OFS(0)) u_rrc_i (.clk, .rst_n, .in_valid(chip_stb_d), .x(sum_i),
    .cw_en(cw_en && !cw_q), .cw_side, .cw_addr, .cw_data, .y(yi), .y_valid(yi_v), .y_phase(yi_p));
  rrc_interp_fir #(.PHASE_OFS(1)) u_rrc_q (.clk, .rst_n, .in_valid(chip_stb_d), .x(sum_q),
    .cw_en(cw_en && cw_q), .cw_side, .cw_addr, .cw_data, .y(yq), .y_valid(yq_v), .y_phase(yq_p));

  iq_mod_fs4 #(.AW(CHIP_W + 13), .SHIFT(IF_SHIFT)) u_iq (.clk, .rst_n, .chip_stb, .if_stb,
    .i_valid(yi_v), .i_phase(yi_p), .i_data(yi), .q_valid(yq_v), .q_phase(yq_p), .q_data(yq),
    .if_out);
endmodule
