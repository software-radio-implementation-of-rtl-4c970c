// iq_demod_fs4: I/Q down-conversion of the 32768 kHz IF signal with the carrier
// at fs/4 (8192 kHz).
//
// cos and sin at fs/4 are 1,0,-1,0 and 0,1,0,-1, so I = x*cos and Q = -x*sin
// need no multiplier: I takes +x, 0, -x, 0 and Q takes 0, -x, 0, +x on
// successive samples. Half of each stream is zero; the half-band filters that
// follow remove the image and decimate by 2. The sign convention and the
// saturation of -(-512) to +511 are this design's choice.
// Timing: one IF sample per 'in_valid'; outputs registered, 'out_valid' one
// cycle later.
module iq_demod_fs4
  import cdma_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IF_W-1:0] x,
  output logic                   out_valid,
  output logic signed [IF_W-1:0] i_out,
  output logic signed [IF_W-1:0] q_out
);
  logic [1:0] n;
  logic signed [IF_W-1:0] nx;
  assign nx = (x == {1'b1, {(IF_W-1){1'b0}}}) ? {1'b0, {(IF_W-1){1'b1}}} : -x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0; out_valid <= 1'b0; i_out <= '0; q_out <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        n <= n + 1'b1;
        unique case (n)
          2'd0: begin i_out <= x;  q_out <= '0; end
          2'd1: begin i_out <= '0; q_out <= nx; end
          2'd2: begin i_out <= nx; q_out <= '0; end
          default: begin i_out <= '0; q_out <= x; end
        endcase
      end
    end
  end
endmodule
