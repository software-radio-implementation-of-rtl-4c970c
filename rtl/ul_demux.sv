// ul_demux: base-station uplink DeMUX, the inverse of the mobile's MUX.
// The I bit is traffic bit a; the Q bit is traffic bit b, or the control bit
// when 'ctl_sel' is set (same rule as the transmitter, this design's choice).
// Timing: registered; 'out_valid' one cycle after 'in_valid'.
module ul_demux (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] bits,
  input  logic       ctl_sel,
  output logic       out_valid,
  output logic       bit_a,
  output logic       bit_b,
  output logic       ctl_valid,
  output logic       ctl
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; bit_a <= 1'b0; bit_b <= 1'b0; ctl_valid <= 1'b0; ctl <= 1'b0;
    end else begin
      out_valid <= in_valid;
      ctl_valid <= in_valid && ctl_sel;
      if (in_valid) begin
        bit_a <= bits[0];
        if (ctl_sel) ctl <= bits[1];
        else         bit_b <= bits[1];
      end
    end
  end
endmodule
