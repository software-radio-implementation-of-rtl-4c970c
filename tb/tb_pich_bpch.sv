// tb_pich_bpch: random cell-code chips and broadcast bits (changing on every
// chip; only the value at position 0 counts). The model gives the I chip as
// +-32 (pilot, sign from the code chip) plus +-8 (broadcast I bit on Walsh
// row 1 times the code) and the Q chip as +-8 (broadcast Q bit); outputs are
// compared in the cycle after each strobe.
module tb_pich_bpch;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic stb, pn; logic [6:0] pos; logic [1:0] bb, bsym; logic signed [9:0] ci, cq;
  pich_bpch dut (.clk, .rst_n, .chip_stb(stb), .pos, .pn, .bpch_bits(bb), .chip_i(ci), .chip_q(cq));
  initial begin
    stb = 0; pn = 0; pos = 0; bb = 0; bsym = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 16 * 128; n++) begin
      int w, ei, eq;
      @(negedge clk);
      stb = 1; pn = 1'($urandom); bb = 2'($urandom);
      if (pos == 0) bsym = bb;
      w = pos[0] ^ pn;
      ei = (pn ? -32 : 32) + ((bsym[0] ^ w) ? -8 : 8);
      eq = (bsym[1] ^ w) ? -8 : 8;
      @(negedge clk); stb = 0;
      checks++;
      if (int'(ci) != ei || int'(cq) != eq) begin
        failures++;
        if (failures < 10) $display("chip %0d: got %0d,%0d exp %0d,%0d", n, ci, cq, ei, eq);
      end
      pos = pos + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
