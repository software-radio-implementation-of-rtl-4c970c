// pre_rake: transmit pre-RAKE of one downlink user.
//
// The base station sends each user's chips twice, through two antennas with a
// delay longer than one chip. The pre-RAKE pre-distorts the chips with the
// channel estimates reported by the mobile so that the paths add coherently at
// the terminal: y[n] = (w0*s[n] + w1*s[n-DELAY]) / 64 (complex). The two-finger
// form, the delay in chips and the weight scale (64 = 1.0) are this design's
// choices; the document names the block and its purpose only.
// Timing: one chip per 'en' cycle; y is registered (one cycle of latency).
module pre_rake
  import cdma_pkg::*;
#(
  parameter int IN_W  = 4,
  parameter int OUT_W = 8,
  parameter int DELAY = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  s_re,
  input  logic signed [IN_W-1:0]  s_im,
  input  w8_t                     w0,
  input  w8_t                     w1,
  output logic signed [OUT_W-1:0] y_re,
  output logic signed [OUT_W-1:0] y_im
);
  localparam int PW = IN_W + 8 + 2;
  logic signed [IN_W-1:0] d_re [DELAY];
  logic signed [IN_W-1:0] d_im [DELAY];
  logic signed [PW-1:0] acc_re, acc_im;

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [PW-1:0] v);
    localparam logic signed [PW-1:0] MX = PW'((1 << (OUT_W - 1)) - 1);
    if (v > MX) return OUT_W'(MX);
    if (v < -MX - 1) return OUT_W'(-MX - 1);
    return OUT_W'(v);
  endfunction

  always_comb begin
    acc_re = PW'(s_re * w0.re) - PW'(s_im * w0.im)
           + PW'(d_re[DELAY-1] * w1.re) - PW'(d_im[DELAY-1] * w1.im);
    acc_im = PW'(s_re * w0.im) + PW'(s_im * w0.re)
           + PW'(d_re[DELAY-1] * w1.im) + PW'(d_im[DELAY-1] * w1.re);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DELAY; k++) begin d_re[k] <= '0; d_im[k] <= '0; end
      y_re <= '0; y_im <= '0;
    end else if (en) begin
      d_re[0] <= s_re; d_im[0] <= s_im;
      for (int k = 1; k < DELAY; k++) begin d_re[k] <= d_re[k-1]; d_im[k] <= d_im[k-1]; end
      y_re <= sat(acc_re >>> 6);
      y_im <= sat(acc_im >>> 6);
    end
  end
endmodule
