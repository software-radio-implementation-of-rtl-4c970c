// hb_decim_fir: half-band low-pass filter followed by decimation by 2, in
// symmetric transposed form with distributed-arithmetic multipliers.
//
// In transposed form every input sample is multiplied by all coefficients at
// once and the products are added into a chain of registers that runs towards
// the output. Because the half-band coefficients are symmetric, one multiplier
// serves taps k and NTAPS-1-k; because every other coefficient off the centre
// is zero, those multipliers are not built. Each multiplier is a da_mult with
// its constant in ROM, so an input takes 4 cycles. Every second output is kept
// (decimation by 2). The structure follows the document; the tap count
// (11, Hamming-windowed half-band, centre tap 2048) and output scaling are
// this design's choices.
// Timing: 'in_valid' at most once every 4 cycles. An output sample (y_valid)
// follows every second input, 4 cycles after that input.
module hb_decim_fir
  import cdma_pkg::*;
#(
  parameter int  NTAPS      = 11,
  parameter real COEF_SCALE = 4096.0,
  parameter int  OUT_W      = 12,
  parameter int  OUT_SHIFT  = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [9:0]       x,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);
  localparam int HALF = (NTAPS - 1) / 2;          // centre tap index
  localparam int SW   = 22 + $clog2(NTAPS) + 1;
  logic signed [21:0] prod [HALF+1];
  logic done [HALF+1];
  logic signed [SW-1:0] chain [NTAPS-1];
  logic signed [SW-1:0] full;
  logic keep;

  for (genvar k = 0; k <= HALF; k++) begin : g_mult
    localparam int H = hb_coef(k, NTAPS, COEF_SCALE);
    if (H != 0) begin : g_nz
      da_mult #(.C(H < 0 ? -H : H), .NEG(H < 0)) u_da (
        .clk, .rst_n, .start(in_valid), .x, .p(prod[k]), .done(done[k]));
    end else begin : g_z
      assign prod[k] = '0;
      assign done[k] = 1'b0;
    end
  end

  function automatic logic signed [SW-1:0] pk(input int j);
    return SW'(prod[j <= HALF ? j : NTAPS - 1 - j]);
  endfunction

  assign full = pk(0) + chain[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NTAPS - 1; j++) chain[j] <= '0;
      keep <= 1'b0; y <= '0; y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (done[HALF]) begin
        for (int j = 0; j < NTAPS - 2; j++) chain[j] <= pk(j + 1) + chain[j + 1];
        chain[NTAPS-2] <= pk(NTAPS - 1);
        keep <= !keep;
        if (keep) begin
          y_valid <= 1'b1;
          if ((full >>> OUT_SHIFT) > SW'((1 << (OUT_W - 1)) - 1))      y <= OUT_W'((1 << (OUT_W - 1)) - 1);
          else if ((full >>> OUT_SHIFT) < -SW'(1 << (OUT_W - 1)))      y <= OUT_W'(-(1 << (OUT_W - 1)));
          else                                                         y <= OUT_W'(full >>> OUT_SHIFT);
        end
      end
    end
  end
endmodule
