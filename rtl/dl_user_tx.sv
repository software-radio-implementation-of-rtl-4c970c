// dl_user_tx: one user slice of the base-station downlink transmitter.
//
// Per symbol (DL_SF = 128 chips) the user's data word is mapped onto up to four
// QPSK channels (channel_map). Each channel is spread by its own Walsh row
// combined with the cell Gold code, and the four spread channels are summed
// (orthogonal multiplexing). The sum passes the pre-RAKE and is finally scaled
// by the two branch weights w_i (I) and w_j (Q). The spreading and combining
// follow the document; reading w_i / w_j as per-user gains (16 = unity) is this
// design's choice.
// Timing: 'chip_stb' marks a chip; 'pos' is the chip position in the symbol and
// 'pn' the cell code chip for that position. 'data' is sampled at pos 0 and held
// for the symbol. chip_i/chip_q are valid from the cycle after 'chip_stb'.
module dl_user_tx
  import cdma_pkg::*;
#(
  parameter int OUT_W = CHIP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    chip_stb,
  input  logic [6:0]              pos,
  input  logic                    pn,
  input  logic [2*N_CH-1:0]       data,
  input  dl_user_cfg_t            cfg,
  output logic signed [OUT_W-1:0] chip_i,
  output logic signed [OUT_W-1:0] chip_q
);
  logic [2*N_CH-1:0] data_q, data_sym;
  logic signed [1:0] sym_i [N_CH];
  logic signed [1:0] sym_q [N_CH];
  logic signed [3:0] sum_i, sum_q;
  logic signed [7:0] pr_i, pr_q;
  logic signed [16:0] g_i, g_q;

  assign data_sym = (pos == 7'd0) ? data : data_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) data_q <= '0;
    else if (chip_stb && pos == 7'd0) data_q <= data;

  channel_map #(.N_CH(N_CH)) u_map (.data(data_sym), .n_ch(cfg.n_ch), .sym_i(sym_i), .sym_q(sym_q));

  // Walsh x PN spreading and channel sum
  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int c = 0; c < N_CH; c++) begin
      if (walsh_chip(cfg.walsh[c], pos) ^ pn) begin
        sum_i = sum_i - 4'(sym_i[c]);
        sum_q = sum_q - 4'(sym_q[c]);
      end else begin
        sum_i = sum_i + 4'(sym_i[c]);
        sum_q = sum_q + 4'(sym_q[c]);
      end
    end
  end

  pre_rake #(.IN_W(4), .OUT_W(8), .DELAY(2)) u_prake (
    .clk, .rst_n, .en(chip_stb), .s_re(sum_i), .s_im(sum_q),
    .w0(cfg.w0), .w1(cfg.w1), .y_re(pr_i), .y_im(pr_q));

  // w_i / w_j branch weights
  assign g_i = (17'(pr_i) * 17'(signed'({1'b0, cfg.gain_i}))) >>> 2;
  assign g_q = (17'(pr_q) * 17'(signed'({1'b0, cfg.gain_q}))) >>> 2;

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [16:0] v);
    if (v > 17'sd511) return OUT_W'(511);
    if (v < -17'sd512) return OUT_W'(-512);
    return OUT_W'(v);
  endfunction

  assign chip_i = sat(g_i);
  assign chip_q = sat(g_q);
endmodule
