// cplx_mixer: complex multiplier that rotates a baseband sample by the NCO
// phase: (i + jq) * (cos - j sin), scaled back by 2^9 (table amplitude 511).
// With DIR=1 the rotation is by +phase (cos + j sin), used for transmit
// frequency pre-correction. Rounding by truncation is this design's choice.
// Timing: registered; 'out_valid' one cycle after 'in_valid'.
module cplx_mixer #(
  parameter int W   = 12,
  parameter bit DIR = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  input  logic signed [9:0]   cos_i,
  input  logic signed [9:0]   sin_i,
  output logic                out_valid,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);
  localparam int PW = W + 11;
  logic signed [9:0] s;
  logic signed [PW-1:0] ri, rq;
  assign s  = DIR ? -sin_i : sin_i;
  assign ri = PW'(i_in * cos_i) + PW'(q_in * s);
  assign rq = PW'(q_in * cos_i) - PW'(i_in * s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; i_out <= '0; q_out <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= W'(ri >>> 9);
        q_out <= W'(rq >>> 9);
      end
    end
  end
endmodule
