// iq_mod_fs4: I/Q modulation and IF translation at a quarter of the sample rate.
//
// With the carrier at 8192 kHz and sampling at 32768 kHz, cos and sin take only
// the values 1, 0, -1, 0, so the IF signal s = I*cos - Q*sin is an interleave
// of the I filter's even phases and the Q filter's odd phases with alternating
// signs: +I0, -Q0, -I1, +Q1, +I2, -Q2, -I3, +Q3 per chip. The filters deliver
// the four phases of a chip in a burst; they are collected, moved to the play
// buffer at the next 'chip_stb' and sent out one per 'if_stb'.
// Output scaling (arithmetic shift by SHIFT, then saturation to IF_W bits) is
// this design's choice. 'chip_stb' must coincide with an 'if_stb'.
// Latency: a chip's IF samples start one chip period after its filter burst.
module iq_mod_fs4
  import cdma_pkg::*;
#(
  parameter int AW    = 23,
  parameter int SHIFT = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   chip_stb,
  input  logic                   if_stb,
  input  logic                   i_valid,
  input  logic [1:0]             i_phase,
  input  logic signed [AW-1:0]   i_data,
  input  logic                   q_valid,
  input  logic [1:0]             q_phase,
  input  logic signed [AW-1:0]   q_data,
  output logic signed [IF_W-1:0] if_out
);
  logic signed [AW-1:0] pend_i [4], pend_q [4], play_i [4], play_q [4];
  logic [2:0] t;
  logic if_stb_d;
  logic signed [AW-1:0] v, vs;

  always_comb begin
    unique case (t[1:0])
      2'd0: v = play_i[t[2:1]];
      2'd1: v = -play_q[t[2:1]];
      2'd2: v = -play_i[t[2:1]];
      default: v = play_q[t[2:1]];
    endcase
    vs = v >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) begin
        pend_i[k] <= '0; pend_q[k] <= '0; play_i[k] <= '0; play_q[k] <= '0;
      end
      t <= '0; if_stb_d <= 1'b0; if_out <= '0;
    end else begin
      if (i_valid) pend_i[i_phase] <= i_data;
      if (q_valid) pend_q[q_phase] <= q_data;
      if (chip_stb) begin
        play_i <= pend_i;
        play_q <= pend_q;
      end
      if_stb_d <= if_stb;
      if (chip_stb) t <= '0;
      else if (if_stb_d) begin
        if (vs > AW'((1 << (IF_W - 1)) - 1))  if_out <= IF_W'((1 << (IF_W - 1)) - 1);
        else if (vs < -AW'(1 << (IF_W - 1)))  if_out <= IF_W'(-(1 << (IF_W - 1)));
        else                                   if_out <= IF_W'(vs);
        t <= t + 1'b1;
      end
    end
  end
endmodule
