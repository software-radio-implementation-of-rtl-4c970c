// tb_dl_user_tx: drives chip strobes with a running chip position, a random
// cell-code chip and a data word that changes on every chip (only the value at
// position 0 may be used). Random configurations are applied for several
// symbols each. The model computes the spread channel sum with Walsh rows,
// the pre-RAKE (w0*s[n] + w1*s[n-2]) / 64 saturated to 8 bits, and the gain
// stage y*g/4 saturated to 10 bits, all with floor division; outputs are
// compared in the cycle after each strobe.
module tb_dl_user_tx;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic stb, pn; logic [6:0] pos; logic [7:0] data; dl_user_cfg_t cfg;
  logic signed [9:0] ci, cq;
  dl_user_tx dut (.clk, .rst_n, .chip_stb(stb), .pos, .pn, .data, .cfg, .chip_i(ci), .chip_q(cq));
  function automatic int fdiv(int v, int d); return (v >= 0) ? v / d : -((-v + d - 1) / d); endfunction
  function automatic int sat(int v, int m); return v > m ? m : (v < -m - 1 ? -m - 1 : v); endfunction
  initial begin
    int sr [$], si [$];
    logic [7:0] dsym;
    stb = 0; pn = 0; pos = 0; data = 0; cfg = '0;
    sr = {0, 0}; si = {0, 0};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int blk = 0; blk < 12; blk++) begin
      for (int c = 0; c < 4; c++) cfg.walsh[c] = 7'($urandom);
      cfg.n_ch = 3'($urandom_range(0, 4));
      cfg.w0.re = 8'($urandom); cfg.w0.im = 8'($urandom);
      cfg.w1.re = 8'($urandom_range(0, 40)); cfg.w1.im = 8'($urandom_range(0, 40));
      if (blk < 3) begin cfg.w0 = '{re: 8'd64, im: 8'd0}; cfg.w1 = '0; end
      cfg.gain_i = 8'($urandom_range(0, 40)); cfg.gain_q = 8'($urandom_range(0, 40));
      for (int n = 0; n < 3 * 128; n++) begin
        int s_re, s_im, ar, ai, yr, yi, ch_i, ch_q;
        @(negedge clk);
        stb = 1; pn = 1'($urandom); data = 8'($urandom);
        if (pos == 0) dsym = data;
        s_re = 0; s_im = 0;
        for (int c = 0; c < 4; c++) begin
          int sg, bi, bq;
          sg = (^(cfg.walsh[c] & pos) ^ pn) ? -1 : 1;
          bi = (c < cfg.n_ch) ? (dsym[2*c] ? -1 : 1) : 0;
          bq = (c < cfg.n_ch) ? (dsym[2*c+1] ? -1 : 1) : 0;
          s_re += sg * bi; s_im += sg * bq;
        end
        ar = s_re * cfg.w0.re - s_im * cfg.w0.im + sr[0] * cfg.w1.re - si[0] * cfg.w1.im;
        ai = s_re * cfg.w0.im + s_im * cfg.w0.re + sr[0] * cfg.w1.im + si[0] * cfg.w1.re;
        void'(sr.pop_front()); void'(si.pop_front()); sr.push_back(s_re); si.push_back(s_im);
        yr = sat(fdiv(ar, 64), 127); yi = sat(fdiv(ai, 64), 127);
        ch_i = sat(fdiv(yr * cfg.gain_i, 4), 511); ch_q = sat(fdiv(yi * cfg.gain_q, 4), 511);
        @(negedge clk); stb = 0;
        checks++;
        if (int'(ci) != ch_i || int'(cq) != ch_q) begin
          failures++;
          if (failures < 10) $display("blk %0d chip %0d: got %0d,%0d exp %0d,%0d", blk, n, ci, cq, ch_i, ch_q);
        end
        pos = pos + 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
