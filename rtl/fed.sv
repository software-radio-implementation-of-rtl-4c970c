// fed: frequency error detector and loop integrator driving the receiver NCO.
//
// A residual carrier offset rotates successive despread pilot symbols by a
// constant angle. The cross product e = Im(P[k] * conj(P[k-1])) =
// Q[k]I[k-1] - I[k]Q[k-1] is proportional to that angle; the loop integrates
// e/2^GAIN_SH into the NCO frequency word. Detector and loop form are this
// design's choice; the document names an FED feeding the NCO.
// Timing: updated on 'p_valid' while 'enable'; the first symbol after
// 'enable' rises only primes P[k-1].
module fed #(
  parameter int W       = 20,
  parameter int FW      = 24,
  parameter int GAIN_SH = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 p_valid,
  input  logic signed [W-1:0]  p_re,
  input  logic signed [W-1:0]  p_im,
  output logic signed [2*W:0]  err,
  output logic signed [FW-1:0] freq
);
  logic signed [W-1:0] prev_re, prev_im;
  logic have_prev;
  logic signed [2*W:0] e;
  assign e = (2*W+1)'(p_im * prev_re) - (2*W+1)'(p_re * prev_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_re <= '0; prev_im <= '0; have_prev <= 1'b0; err <= '0; freq <= '0;
    end else if (!enable) begin
      have_prev <= 1'b0;
    end else if (p_valid) begin
      prev_re <= p_re; prev_im <= p_im;
      have_prev <= 1'b1;
      if (have_prev) begin
        err  <= e;
        freq <= freq + FW'(e >>> GAIN_SH);
      end
    end
  end
endmodule
