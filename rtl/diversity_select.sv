// diversity_select: selection diversity between two uplink receivers (two
// base-station antennas). Each receiver's latest soft symbol is held; when
// receiver A delivers a symbol, the receiver whose held symbol has the larger
// |Re z| + |Im z| supplies the bit decisions (signs of z). A receiver that is
// not locked is never chosen. The metric and the pairing on A's symbol timing
// are this design's choices; the document names the block only.
// Timing: registered; 'out_valid' one cycle after A's 'a_valid'.
module diversity_select #(
  parameter int ZW = 37
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 a_valid,
  input  logic                 a_locked,
  input  logic signed [ZW-1:0] a_re,
  input  logic signed [ZW-1:0] a_im,
  input  logic                 b_valid,
  input  logic                 b_locked,
  input  logic signed [ZW-1:0] b_re,
  input  logic signed [ZW-1:0] b_im,
  output logic                 out_valid,
  output logic [1:0]           bits,
  output logic                 sel_b
);
  logic signed [ZW-1:0] hb_re, hb_im;
  logic [ZW:0] ma, mb;

  function automatic logic [ZW:0] mag(input logic signed [ZW-1:0] r, input logic signed [ZW-1:0] i);
    return (ZW+1)'(r[ZW-1] ? -r : r) + (ZW+1)'(i[ZW-1] ? -i : i);
  endfunction

  assign ma = a_locked ? mag(a_re, a_im) : '0;
  assign mb = b_locked ? mag(hb_re, hb_im) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hb_re <= '0; hb_im <= '0; out_valid <= 1'b0; bits <= '0; sel_b <= 1'b0;
    end else begin
      if (b_valid) begin hb_re <= b_re; hb_im <= b_im; end
      out_valid <= a_valid && (a_locked || b_locked);
      if (a_valid) begin
        if (mb > ma) begin
          sel_b <= 1'b1; bits <= {hb_im[ZW-1], hb_re[ZW-1]};
        end else begin
          sel_b <= 1'b0; bits <= {a_im[ZW-1], a_re[ZW-1]};
        end
      end
    end
  end
endmodule
