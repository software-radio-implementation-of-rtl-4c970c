// code_acq: serial-search code acquisition and tracking (code, symbol and
// frame timing of the receiver).
//
// A local Gold generator, reloaded every SF chips like the transmitter's, is
// correlated with the incoming chips over one code period (the dwell):
// C = sum r*pn for I and Q. The dwell passes when |C_I|+|C_Q| exceeds
// 2^-TH_SH of the summed magnitudes of the chips in that dwell, a threshold
// that follows the signal level. A failed dwell holds the local code for one
// chip (a slip) and the search tries the next code phase. Once locked, MISS
// failed dwells in a row drop the lock and resume the search. The method and
// its constants are this design's choice; the document names the block only.
// Interface: for each chip (chip_valid) 'pos' and 'pn' give the local code
// position and chip aligned with that input chip; 'sym_end' pulses with the
// last chip of a code period; 'chip_en' marks the chips that are used (a
// slipped chip is not).
module code_acq
  import cdma_pkg::*;
#(
  parameter int         SF     = 128,
  parameter logic [6:0] SEED_A = 7'h01,
  parameter logic [6:0] SEED_B = 7'h55,
  parameter int         TH_SH  = 2,
  parameter int         MISS   = 4,
  localparam int        PW     = $clog2(SF)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           chip_valid,
  input  rx_cplx_t       chip,
  output logic           locked,
  output logic [PW-1:0]  pos,
  output logic           pn,
  output logic           sym_end,
  output logic           chip_en,
  output logic           slip_evt
);
  localparam int CW = RX_W + PW + 1;
  logic slip;
  logic signed [CW-1:0] ci, cq, ci_n, cq_n;
  logic [CW-1:0] mag, mag_n, e_n;
  logic [$clog2(MISS+1)-1:0] misses;
  logic last;

  gold_gen #(.PERIOD(SF), .SEED_A(SEED_A), .SEED_B(SEED_B)) u_code (
    .clk, .rst_n, .en(chip_valid && !slip), .restart(1'b0), .chip(pn), .pos(pos));

  assign last = (pos == PW'(SF - 1));
  assign ci_n = pn ? ci - CW'(chip.re) : ci + CW'(chip.re);
  assign cq_n = pn ? cq - CW'(chip.im) : cq + CW'(chip.im);
  assign mag_n = mag + CW'(chip.re[RX_W-1] ? -chip.re : chip.re)
                     + CW'(chip.im[RX_W-1] ? -chip.im : chip.im);
  assign e_n = CW'(ci_n[CW-1] ? -ci_n : ci_n) + CW'(cq_n[CW-1] ? -cq_n : cq_n);
  assign sym_end = chip_valid && !slip && last;
  assign chip_en = chip_valid && !slip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slip <= 1'b0; ci <= '0; cq <= '0; mag <= '0; locked <= 1'b0; misses <= '0; slip_evt <= 1'b0;
    end else begin
      slip_evt <= 1'b0;
      if (chip_valid) begin
        if (slip) begin
          slip <= 1'b0;          // this chip is skipped: local code held
        end else if (last) begin
          ci <= '0; cq <= '0; mag <= '0;
          if (e_n > (mag_n >> TH_SH)) begin
            locked <= 1'b1;
            misses <= '0;
          end else if (locked && misses != ($clog2(MISS+1))'(MISS - 1)) begin
            misses <= misses + 1'b1;
          end else begin
            locked   <= 1'b0;
            misses   <= '0;
            slip     <= 1'b1;
            slip_evt <= 1'b1;
          end
        end else begin
          ci <= ci_n; cq <= cq_n; mag <= mag_n;
        end
      end
    end
  end
endmodule
