// chip_sync: chip-timing selection and decimation by 4.
//
// The matched-filter output has 4 samples per chip. For each of the 4 sample
// phases the magnitude |I|+|Q| is accumulated over WIN chips; at the end of
// each window the phase with the largest sum (the eye opening) is compared
// with the current sampling phase; if it beats it by more than 2^-HYST_SH
// (hysteresis) the sampling phase moves one step towards it (at most one
// quarter chip per window). One sample per chip at the sampling phase is passed
// on. A step across the chip boundary keeps the chip count right: moving
// forward from phase 3 to 0 skips the next output, which would repeat the last
// chip, and moving back from 0 to 3 outputs the current phase-3 sample as an
// extra chip. The method is this design's choice (the document names the
// block only).
// Timing: one input per 'in_valid'; 'chip_valid' marks a selected sample, one
// cycle after its input.
module chip_sync
  import cdma_pkg::*;
#(
  parameter int WIN     = 256,
  parameter int HYST_SH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  rx_cplx_t             x,
  output logic                 chip_valid,
  output rx_cplx_t             chip,
  output logic [1:0]           phase_sel
);
  localparam int EW = RX_W + 1 + $clog2(WIN);
  logic [EW-1:0] energy [4];
  logic [1:0] ph;
  logic [$clog2(WIN)-1:0] nchip;
  logic [RX_W-1:0] mag_i, mag_q;
  logic [1:0] best;
  logic [EW-1:0] e_now, e_best, e_sel;
  logic skip, do_sw;
  logic [1:0] delta, nxt;

  assign mag_i = x.re[RX_W-1] ? RX_W'(-x.re) : RX_W'(x.re);
  assign mag_q = x.im[RX_W-1] ? RX_W'(-x.im) : RX_W'(x.im);
  assign e_now = energy[ph] + EW'(mag_i) + EW'(mag_q);

  // phase with the largest energy, counting the sample being added now
  always_comb begin
    logic [EW-1:0] e [4];
    for (int k = 0; k < 4; k++) e[k] = (2'(k) == ph) ? e_now : energy[k];
    best = 2'd0;
    for (int k = 1; k < 4; k++) if (e[k] > e[best]) best = 2'(k);
    e_best = e[best];
    e_sel  = e[phase_sel];
  end
  assign do_sw = e_best > e_sel + (e_sel >> HYST_SH);
  assign delta = best - phase_sel;
  assign nxt   = (delta == 2'd3) ? phase_sel - 1'b1 : phase_sel + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) energy[k] <= '0;
      ph <= '0; nchip <= '0; phase_sel <= '0; chip_valid <= 1'b0; chip <= '0; skip <= 1'b0;
    end else begin
      chip_valid <= 1'b0;
      if (in_valid) begin
        ph <= ph + 1'b1;
        if (ph == phase_sel) begin
          chip_valid <= !skip;
          chip <= x;
          skip <= 1'b0;
        end
        if (ph == 2'd3 && nchip == $clog2(WIN)'(WIN - 1)) begin
          if (do_sw) begin
            phase_sel <= nxt;
            if (phase_sel == 2'd3 && nxt == 2'd0) skip <= 1'b1;
            if (phase_sel == 2'd0 && nxt == 2'd3) begin
              chip_valid <= 1'b1;
              chip <= x;
            end
          end
          for (int k = 0; k < 4; k++) energy[k] <= '0;
          nchip <= '0;
        end else begin
          energy[ph] <= e_now;
          if (ph == 2'd3) nchip <= nchip + 1'b1;
        end
      end
    end
  end
endmodule
