// mf_fir: receive matched filter (root raised cosine) at 4 samples per chip.
//
// Direct-form FIR: a delay line of NTAPS samples, one product per tap and an
// adder tree, one output per input. The taps are the RRC response with
// roll-off BETA over NTAPS/4 chips, scale 128, computed at elaboration. The
// document names a matched FIR per branch; the form, length and roll-off are
// this design's choices.
// Timing: registered; 'y_valid' one cycle after 'in_valid'.
module mf_fir
  import cdma_pkg::*;
#(
  parameter int  NTAPS     = 17,
  parameter real BETA      = 0.22,
  parameter int  W         = RX_W,
  parameter int  OUT_SHIFT = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic                y_valid
);
  localparam int SW = W + 10 + $clog2(NTAPS);
  logic signed [W-1:0] d [NTAPS];
  logic signed [SW-1:0] acc;

  always_comb begin
    acc = SW'(x) * SW'(rx_rrc_coef(0, NTAPS, BETA));
    for (int k = 1; k < NTAPS; k++)
      acc = acc + SW'(d[k-1]) * SW'(rx_rrc_coef(k, NTAPS, BETA));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) d[k] <= '0;
      y <= '0; y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        d[0] <= x;
        for (int k = 1; k < NTAPS; k++) d[k] <= d[k-1];
        if ((acc >>> OUT_SHIFT) > SW'((1 << (W - 1)) - 1))  y <= W'((1 << (W - 1)) - 1);
        else if ((acc >>> OUT_SHIFT) < -SW'(1 << (W - 1)))  y <= W'(-(1 << (W - 1)));
        else                                                y <= W'(acc >>> OUT_SHIFT);
      end
    end
  end
endmodule
