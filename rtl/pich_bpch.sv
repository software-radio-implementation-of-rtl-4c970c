// pich_bpch: pilot (PICH) and broadcast/paging (BPCH) channels of the downlink.
//
// The pilot is a constant +1 symbol on Walsh row 0 carried on the I branch
// only, so that a mobile can despread it into a direct channel estimate. The
// BPCH carries two bits per symbol (I and Q) on Walsh row 1. Both are spread by
// the cell Gold code. Walsh rows, amplitudes and the I-only pilot are this
// design's choices; the document names the channels and their purpose.
// Timing: outputs are registered on 'chip_stb' (valid from the next cycle),
// aligned with the user slices. 'bpch_bits' is sampled at pos 0.
module pich_bpch
  import cdma_pkg::*;
#(
  parameter int PILOT_AMP = 32,
  parameter int BPCH_AMP  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     chip_stb,
  input  logic [6:0]               pos,
  input  logic                     pn,
  input  logic [1:0]               bpch_bits,
  output logic signed [CHIP_W-1:0] chip_i,
  output logic signed [CHIP_W-1:0] chip_q
);
  logic [1:0] bits_q, bits;
  logic w1;
  assign bits = (pos == 7'd0) ? bpch_bits : bits_q;
  assign w1 = walsh_chip(7'd1, pos) ^ pn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q <= '0; chip_i <= '0; chip_q <= '0;
    end else if (chip_stb) begin
      if (pos == 7'd0) bits_q <= bpch_bits;
      chip_i <= CHIP_W'((pn ? -PILOT_AMP : PILOT_AMP) + ((bits[0] ^ w1) ? -BPCH_AMP : BPCH_AMP));
      chip_q <= CHIP_W'((bits[1] ^ w1) ? -BPCH_AMP : BPCH_AMP);
    end
  end
endmodule
