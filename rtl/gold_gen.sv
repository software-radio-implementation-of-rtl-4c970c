// gold_gen: Gold code chip generator used as the downlink cell scrambling code
// and the uplink spreading code.
//
// Two 7-stage Fibonacci LFSRs with the preferred polynomial pair
// x^7+x^3+1 and x^7+x^3+x^2+x+1 are XORed. The registers are reloaded with
// their seeds every PERIOD chips (and on 'restart'), so the code repeats once
// per symbol; the period and the seeds are this design's choice, the use of
// Gold sequences follows the system description.
// Interface: 'chip' is the current chip (1 means -1); it advances by one on a
// cycle with 'en' high. 'pos' counts the chip position 0..PERIOD-1.
module gold_gen #(
  parameter int         PERIOD = 128,
  parameter logic [6:0] SEED_A = 7'h01,
  parameter logic [6:0] SEED_B = 7'h55
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic restart,
  output logic chip,
  output logic [$clog2(PERIOD)-1:0] pos
);
  logic [6:0] a, b;
  localparam logic [$clog2(PERIOD)-1:0] LAST = $clog2(PERIOD)'(PERIOD - 1);

  assign chip = a[0] ^ b[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= SEED_A; b <= SEED_B; pos <= '0;
    end else if (restart || (en && pos == LAST)) begin
      a <= SEED_A; b <= SEED_B; pos <= '0;
    end else if (en) begin
      a <= {a[0] ^ a[3], a[6:1]};
      b <= {b[0] ^ b[1] ^ b[2] ^ b[3], b[6:1]};
      pos <= pos + 1'b1;
    end
  end
endmodule
