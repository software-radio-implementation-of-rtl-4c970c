// rate_gen: strobes for the sample rates of the subsystem, from the single
// system clock (131072 kHz, this design's choice).
// if_stb   : 32768 kHz IF sample rate (every CLK_PER_IF clocks)
// rx_stb   : 16384 kHz receiver rate after decimation by 2 (every 2 IF samples)
// chip_stb : 4096 kchip/s chip rate (every CLK_PER_CHIP clocks)
// All three are high together on the first cycle after reset.
module rate_gen
  import cdma_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic if_stb,
  output logic rx_stb,
  output logic chip_stb
);
  logic [$clog2(CLK_PER_CHIP)-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  assign if_stb   = (cnt % CLK_PER_IF) == 0;
  assign rx_stb   = (cnt % (2 * CLK_PER_IF)) == 0;
  assign chip_stb = cnt == 0;
endmodule
