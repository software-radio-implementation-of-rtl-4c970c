// rrc_interp_fir: root-raised-cosine transmit shaping filter with multiplexed
// multipliers, interpolating the 4096 ksps chip stream by 8.
//
// Only one input sample in eight is non-zero after zero padding, so each output
// needs 8 taps. The IF translation at fs/4 multiplies the I branch by zero at
// odd IF samples and the Q branch at even ones, so each branch filter computes
// only 4 of the 8 output phases (16384 ksps). The 8-tap delay line is split in
// two halves of 4; a multiplexer per half feeds one 10x10 multiplier whose
// coefficient comes from a 16x10 RAM addressed by {phase, tap}. The two
// products are added and accumulated over 4 cycles per phase: 16 cycles per
// input chip. This structure follows the document's figure; the roll-off
// (BETA), the 64-tap length and PHASE_OFS (0: even phases, I; 1: odd, Q) are
// this design's choices. The RAMs are loaded from the RRC formula and can be
// rewritten at run time through the cw_* port.
// Timing: 'in_valid' takes x and starts a 16-cycle run; inputs must be at least
// 17 cycles apart. Phase p is output with 'y_valid' 4*(p+1) cycles after the
// input, y_phase = p.
module rrc_interp_fir
  import cdma_pkg::*;
#(
  parameter int  DW        = 10,
  parameter int  CW        = 10,
  parameter int  PHASE_OFS = 0,
  parameter real BETA      = 0.22,
  localparam int AW        = 2 * DW + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  input  logic                 cw_en,
  input  logic                 cw_side,   // 0: taps 0..3, 1: taps 4..7
  input  logic [3:0]           cw_addr,   // {phase, tap}
  input  logic signed [CW-1:0] cw_data,
  output logic signed [AW-1:0] y,
  output logic                 y_valid,
  output logic [1:0]           y_phase
);
  logic signed [CW-1:0] ram_l [16];
  logic signed [CW-1:0] ram_r [16];
  logic signed [DW-1:0] xs [8];
  logic [3:0] cnt;
  logic busy;
  logic signed [DW-1:0] mux_l, mux_r;
  logic signed [CW-1:0] c_l, c_r;
  logic signed [AW-1:0] prod_sum, acc;

  initial begin
    for (int a = 0; a < 16; a++) begin
      ram_l[a] = CW'(tx_rrc_coef(8 * (a % 4) + 2 * (a / 4) + PHASE_OFS, BETA));
      ram_r[a] = CW'(tx_rrc_coef(8 * (a % 4 + 4) + 2 * (a / 4) + PHASE_OFS, BETA));
    end
  end

  always @(posedge clk) begin
    if (cw_en && !cw_side) ram_l[cw_addr] <= cw_data;
    if (cw_en &&  cw_side) ram_r[cw_addr] <= cw_data;
  end

  assign mux_l = xs[cnt[1:0]];
  assign mux_r = xs[4 + 32'(cnt[1:0])];
  assign c_l = ram_l[cnt];
  assign c_r = ram_r[cnt];
  assign prod_sum = AW'(mux_l * c_l) + AW'(mux_r * c_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) xs[k] <= '0;
      cnt <= '0; busy <= 1'b0; acc <= '0;
      y <= '0; y_valid <= 1'b0; y_phase <= '0;
    end else begin
      y_valid <= 1'b0;
      if (in_valid) begin
        xs[0] <= x;
        for (int k = 1; k < 8; k++) xs[k] <= xs[k-1];
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        if (cnt[1:0] == 2'd0) acc <= prod_sum;
        else                  acc <= acc + prod_sum;
        if (cnt[1:0] == 2'd3) begin
          y       <= acc + prod_sum;
          y_valid <= 1'b1;
          y_phase <= cnt[3:2];
        end
        cnt <= cnt + 1'b1;
        if (cnt == 4'd15) busy <= 1'b0;
      end
    end
  end
endmodule
