// tb_chip_sync: 4 samples per chip where one phase carries large values and
// the others small ones. After the first windows (256 chips each) the selected phase
// must be the hot one; the test then moves the hot phase and checks the
// selection follows. Every chip_valid must carry the input of the selected
// phase (the old or new one at a switch), exactly one per 4 inputs.
module tb_chip_sync;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, cv; rx_cplx_t x, chip; logic [1:0] sel;
  chip_sync dut (.clk, .rst_n, .in_valid(iv), .x, .chip_valid(cv), .chip, .phase_sel(sel));
  initial begin
    int hot, nchips, nin;
    logic [1:0] ps;
    iv = 0; x = '0; nchips = 0; nin = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      hot = (blk * 3 + 1) % 4;
      for (int c = 0; c < 3 * 256; c++) begin
        for (int ph = 0; ph < 4; ph++) begin
          int a;
          a = (ph == hot) ? 1500 : $urandom_range(0, 300);
          @(negedge clk);
          ps = sel;
          iv = 1; nin++;
          x.re = RX_W'($urandom % 2 ? a : -a);
          x.im = RX_W'($urandom % 2 ? a / 2 : -a / 2);
          @(negedge clk); iv = 0;
          if (cv) begin
            nchips++;
            checks++;
            if (chip != x || (2'(ph) != sel && 2'(ph) != ps)) begin failures++; $display("chip at phase %0d, sel %0d", ph, sel); end
          end
        end
      end
      checks++;
      if (int'(sel) != hot) begin failures++; $display("block %0d: sel %0d expected %0d", blk, sel, hot); end
    end
    checks++;
    if (nchips < nin / 4 - 6 || nchips > nin / 4 + 6) begin failures++; $display("%0d chips for %0d samples", nchips, nin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
