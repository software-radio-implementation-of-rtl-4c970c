// da_mult: distributed-arithmetic multiplier by a constant coefficient.
//
// The 10-bit two's-complement input is cut into the digits X[2:0], X[5:3],
// X[8:6] and the sign bit X[9]. A multiplexer presents one digit per cycle to
// an 8 x 14 ROM holding 0..7 times the coefficient C. The accumulator adds the
// ROM word to its own value shifted right by 3 (2^-3); for the sign bit it
// subtracts, which is the +/- control. After the 4 digits the accumulator
// holds C*x/8 (6 fraction bits of the ROM word kept, truncation errors below
// 2 LSB). Digits are taken least significant first so that the 2^-3 feedback
// weights them correctly. NEG=1 swaps add and subtract for a negative
// coefficient. The ROM, digit split, shift and 22-bit width follow the
// document's figure; the binary point is this design's choice.
// Timing: 'start' takes x; 'done' pulses 4 cycles later with p valid (p holds
// until the next start). A new start may coincide with 'done'.
module da_mult #(
  parameter int C      = 2123,
  parameter bit NEG    = 1'b0,
  parameter int ROM_W  = 14,
  parameter int ACC_W  = 22
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [9:0]       x,
  output logic signed [ACC_W-1:0] p,
  output logic                    done
);
  localparam int FRAC = ACC_W - ROM_W - 2;
  logic [ROM_W-1:0] rom [8];
  logic [9:0] xr;
  logic [1:0] step;
  logic busy;
  logic [2:0] digit;
  logic signed [ACC_W-1:0] term, acc_sh;
  logic sub;

  always_comb
    for (int d = 0; d < 8; d++) rom[d] = ROM_W'(d * C);

  // digit multiplexer (MUX 4-1 x 3)
  always_comb begin
    unique case (step)
      2'd0: digit = 3'(x[2:0]);
      2'd1: digit = xr[5:3];
      2'd2: digit = xr[8:6];
      default: digit = {2'b00, xr[9]};
    endcase
  end

  assign sub    = (step == 2'd3) ^ NEG;
  assign term   = ACC_W'(signed'({2'b00, rom[digit]})) <<< FRAC;
  assign acc_sh = p >>> 3;   // only used for steps 1..3

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; step <= '0; busy <= 1'b0; p <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        xr   <= x;
        p    <= sub ? -term : term;
        step <= 2'd1;
        busy <= 1'b1;
      end else if (busy) begin
        p    <= sub ? acc_sh - term : acc_sh + term;
        step <= step + 1'b1;
        if (step == 2'd3) begin
          busy <= 1'b0;
          done <= 1'b1;
          step <= 2'd0;
        end
      end
    end
  end
endmodule
