// cdma_demod: CDMA despreading and QPSK decision for one user.
//
// Every used chip is multiplied by each channel's code (Walsh row XOR the
// scrambling code chip) and accumulated over one symbol of SF chips. With
// PILOT=1 an extra accumulator on Walsh row 0 gives the pilot symbol P for the
// channel estimator and the FED, and each data symbol D is detected
// coherently: z = D * conj(h) with h the channel estimate; the I bit is
// sign(Re z) and the Q bit sign(Im z) (bit 1 means -1). With PILOT=0 (uplink,
// no pilot) z = D. The despreading follows the document; coherent detection
// and bit polarity are this design's choices.
// Timing: 'sym_valid' (P and D registered) follows 'sym_end' by one cycle;
// bits and z follow 'sym_valid' by one more cycle, using the estimate h
// present then (updated with this symbol's pilot).
module cdma_demod
  import cdma_pkg::*;
#(
  parameter int SF    = 128,
  parameter int N_CH  = 4,
  parameter bit PILOT = 1'b1,
  parameter int W     = 20,
  localparam int PW   = $clog2(SF),
  localparam int ZW   = 2 * W + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                chip_en,
  input  rx_cplx_t            chip,
  input  logic [PW-1:0]       pos,
  input  logic                pn,
  input  logic                sym_end,
  input  logic [6:0]          walsh [N_CH],
  input  logic signed [W-1:0] h_re,
  input  logic signed [W-1:0] h_im,
  output logic                sym_valid,
  output logic signed [W-1:0] p_re,
  output logic signed [W-1:0] p_im,
  output logic                bits_valid,
  output logic [2*N_CH-1:0]   bits,
  output logic signed [ZW-1:0] z_re [N_CH],
  output logic signed [ZW-1:0] z_im [N_CH]
);
  logic signed [W-1:0] acc_re [N_CH+1], acc_im [N_CH+1];
  logic signed [W-1:0] nxt_re [N_CH+1], nxt_im [N_CH+1];
  logic signed [W-1:0] d_re [N_CH], d_im [N_CH];
  logic signed [ZW-1:0] zr [N_CH], zi [N_CH];

  always_comb begin
    for (int c = 0; c <= N_CH; c++) begin
      logic neg;
      neg = pn ^ ((c < N_CH) ? walsh_chip(walsh[c < N_CH ? c : 0], 7'(pos)) : 1'b0);
      nxt_re[c] = neg ? acc_re[c] - W'(chip.re) : acc_re[c] + W'(chip.re);
      nxt_im[c] = neg ? acc_im[c] - W'(chip.im) : acc_im[c] + W'(chip.im);
    end
    for (int c = 0; c < N_CH; c++) begin
      if (PILOT) begin
        zr[c] = ZW'(d_re[c] * h_re) + ZW'(d_im[c] * h_im);
        zi[c] = ZW'(d_im[c] * h_re) - ZW'(d_re[c] * h_im);
      end else begin
        zr[c] = ZW'(d_re[c]);
        zi[c] = ZW'(d_im[c]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c <= N_CH; c++) begin acc_re[c] <= '0; acc_im[c] <= '0; end
      for (int c = 0; c < N_CH; c++) begin
        d_re[c] <= '0; d_im[c] <= '0; z_re[c] <= '0; z_im[c] <= '0;
      end
      sym_valid <= 1'b0; bits_valid <= 1'b0; bits <= '0; p_re <= '0; p_im <= '0;
    end else begin
      sym_valid  <= 1'b0;
      bits_valid <= sym_valid;
      if (chip_en) begin
        if (sym_end) begin
          for (int c = 0; c <= N_CH; c++) begin acc_re[c] <= '0; acc_im[c] <= '0; end
          for (int c = 0; c < N_CH; c++) begin d_re[c] <= nxt_re[c]; d_im[c] <= nxt_im[c]; end
          p_re <= nxt_re[N_CH];
          p_im <= nxt_im[N_CH];
          sym_valid <= 1'b1;
        end else begin
          for (int c = 0; c <= N_CH; c++) begin acc_re[c] <= nxt_re[c]; acc_im[c] <= nxt_im[c]; end
        end
      end
      if (sym_valid) begin
        for (int c = 0; c < N_CH; c++) begin
          bits[2*c]   <= zr[c][ZW-1];
          bits[2*c+1] <= zi[c][ZW-1];
          z_re[c] <= zr[c];
          z_im[c] <= zi[c];
        end
      end
    end
  end
endmodule
