// channel_estimator: complex channel estimate from despread pilot symbols.
//
// Each pilot symbol P (despread over one symbol) updates h <- h + (P-h)/2^K;
// the first symbol after 'clear' loads h directly. The recursive average and
// its gain are this design's choice; the document names the block only.
// Timing: h is registered and updated on 'p_valid'.
module channel_estimator #(
  parameter int W = 20,
  parameter int K = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                p_valid,
  input  logic signed [W-1:0] p_re,
  input  logic signed [W-1:0] p_im,
  output logic signed [W-1:0] h_re,
  output logic signed [W-1:0] h_im,
  output logic                h_valid
);
  logic first;
  logic signed [W:0] d_re, d_im;
  assign d_re = (W+1)'(p_re) - (W+1)'(h_re);
  assign d_im = (W+1)'(p_im) - (W+1)'(h_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first <= 1'b1; h_re <= '0; h_im <= '0; h_valid <= 1'b0;
    end else if (clear) begin
      first <= 1'b1; h_valid <= 1'b0;
    end else if (p_valid) begin
      h_valid <= 1'b1;
      first <= 1'b0;
      if (first) begin
        h_re <= p_re; h_im <= p_im;
      end else begin
        h_re <= h_re + W'(d_re >>> K);
        h_im <= h_im + W'(d_im >>> K);
      end
    end
  end
endmodule
