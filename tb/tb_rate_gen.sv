// tb_rate_gen: counts clock cycles between strobes. if_stb must come every
// 4 cycles, rx_stb every 8 and chip_stb every 32 (131072 kHz clock giving
// 32768 kHz IF samples, 16384 kHz receiver samples and 4096 kchip/s), and
// chip_stb must coincide with if_stb and rx_stb.
module tb_rate_gen;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic if_stb, rx_stb, chip_stb;
  rate_gen dut (.clk, .rst_n, .if_stb, .rx_stb, .chip_stb);
  initial begin
    int last_if, last_rx, last_chip, n;
    last_if = -1; last_rx = -1; last_chip = -1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (n = 0; n < 2000 + $urandom_range(0, 100); n++) begin
      @(negedge clk);
      if (if_stb) begin
        checks++;
        if (last_if >= 0 && n - last_if != 4) begin failures++; $display("if_stb gap %0d", n - last_if); end
        last_if = n;
      end
      if (rx_stb) begin
        checks++;
        if ((last_rx >= 0 && n - last_rx != 8) || !if_stb) begin failures++; $display("rx_stb gap %0d", n - last_rx); end
        last_rx = n;
      end
      if (chip_stb) begin
        checks++;
        if ((last_chip >= 0 && n - last_chip != 32) || !rx_stb) begin failures++; $display("chip_stb gap %0d", n - last_chip); end
        last_chip = n;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
