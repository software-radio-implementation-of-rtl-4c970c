// tb_cdma_demod: builds received chips for a 128-chip symbol here: a pilot
// (amplitude 32 on Walsh row 0) plus four QPSK channels (amplitude 8, random
// distinct Walsh rows), all times a random cell-code chip, rotated by a random
// complex channel gain and with noise added. The channel estimate input is set
// to the true pilot response. Per symbol the test checks the pilot sum P and
// the z values exactly against sums computed here, and the decided bits
// against the transmitted bits. Chip strobes have random gaps.
module tb_cdma_demod;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ce, pn, se, sv, bv; rx_cplx_t chip; logic [6:0] pos; logic [6:0] walsh [4];
  logic signed [19:0] hr, hi, pr, pi; logic [7:0] bits;
  logic signed [40:0] zr [4], zi [4];
  cdma_demod dut (.clk, .rst_n, .chip_en(ce), .chip, .pos, .pn, .sym_end(se), .walsh, .h_re(hr), .h_im(hi),
                  .sym_valid(sv), .p_re(pr), .p_im(pi), .bits_valid(bv), .bits, .z_re(zr), .z_im(zi));
  initial begin
    ce = 0; chip = '0; pos = 0; pn = 0; se = 0; hr = 0; hi = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      real th, g;
      int gr, gi;
      longint dr [5], di [5];
      logic [7:0] tx;
      logic [6:0] used;
      th = $urandom_range(0, 6283) / 1000.0;
      g = $urandom_range(50, 150) / 100.0;
      gr = $rtoi(g * 64.0 * $cos(th)); gi = $rtoi(g * 64.0 * $sin(th));
      used = 0;
      for (int c = 0; c < 4; c++) begin
        logic [6:0] w;
        do w = 7'($urandom_range(2, 127)); while (w == used || (c > 0 && (w == walsh[0] || w == walsh[1] || w == walsh[2])));
        walsh[c] = w; used = w;
      end
      tx = 8'($urandom);
      for (int c = 0; c < 5; c++) begin dr[c] = 0; di[c] = 0; end
      for (int n = 0; n < 128; n++) begin
        int ar, ai, xr, xi, sg;
        pn = 1'($urandom);
        ar = pn ? -32 : 32; ai = 0;
        for (int c = 0; c < 4; c++) begin
          sg = (^(walsh[c] & 7'(n)) ^ pn) ? -8 : 8;
          ar += tx[2*c] ? -sg : sg;
          ai += tx[2*c+1] ? -sg : sg;
        end
        xr = (ar * gr - ai * gi) / 64 + $signed($urandom_range(0, 40)) - 20;
        xi = (ar * gi + ai * gr) / 64 + $signed($urandom_range(0, 40)) - 20;
        for (int c = 0; c < 5; c++) begin
          sg = pn ^ ((c < 4) ? ^(walsh[c] & 7'(n)) : 1'b0);
          dr[c] += sg ? -xr : xr; di[c] += sg ? -xi : xi;
        end
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ce = 1; pos = 7'(n); se = (n == 127);
        chip.re = RX_W'(xr); chip.im = RX_W'(xi);
        @(negedge clk); ce = 0; se = 0;
      end
      hr = 20'(128 * 32 * gr / 64); hi = 20'(128 * 32 * gi / 64);
      checks++;
      if (!sv || longint'(pr) != dr[4] || longint'(pi) != di[4]) begin
        failures++; $display("sym %0d: P %0d,%0d exp %0d,%0d (valid %0b)", s, pr, pi, dr[4], di[4], sv);
      end
      @(negedge clk);
      checks++;
      if (!bv || bits != tx) begin failures++; $display("sym %0d: bits %h exp %h", s, bits, tx); end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (longint'(zr[c]) != dr[c] * hr + di[c] * hi || longint'(zi[c]) != di[c] * hr - dr[c] * hi) begin
          failures++; $display("sym %0d ch %0d: z mismatch", s, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (60000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
