// tb_rrc_interp_fir: random chips into the I-phase and Q-phase filters. For
// every chip the four outputs of each are compared with the polyphase sums
// sum_k x[m-k] h[8k+r] (r = 2p for I, 2p+1 for Q) of the 64-tap RRC computed
// here, and their timing (phase p ready 4(p+1) cycles after the chip, 16
// cycles per chip) is checked. Then a coefficient is rewritten through the
// RAM port and the effect checked.
module tb_rrc_interp_fir;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, cw_en, cw_side; logic [3:0] cw_addr; logic signed [9:0] x, cw_data;
  logic signed [22:0] yi, yq; logic vi, vq; logic [1:0] pi, pq;
  rrc_interp_fir #(.PHASE_OFS(0)) di (.clk, .rst_n, .in_valid(iv), .x, .cw_en, .cw_side, .cw_addr, .cw_data, .y(yi), .y_valid(vi), .y_phase(pi));
  rrc_interp_fir #(.PHASE_OFS(1)) dq (.clk, .rst_n, .in_valid(iv), .x, .cw_en(1'b0), .cw_side, .cw_addr, .cw_data, .y(yq), .y_valid(vq), .y_phase(pq));
  int h [64];
  int hist [$];
  initial begin
    iv = 0; x = 0; cw_en = 0; cw_side = 0; cw_addr = 0; cw_data = 0;
    for (int n = 0; n < 64; n++) h[n] = tx_rrc_coef(n, 0.22);
    checks++;
    if (h[31] != h[32] || h[31] < 250 || h[31] > 280) begin failures++; $display("RRC taps wrong"); end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 8; k++) hist.push_back(0);
    for (int m = 0; m < 400; m++) begin
      if (m == 300) begin
        // rewrite tap 8*5+2*1 (right RAM, phase 1, tap 1) of the I filter to 100
        @(negedge clk); cw_en = 1; cw_side = 1; cw_addr = 4'({2'd1, 2'd1}); cw_data = 10'sd100;
        @(negedge clk); cw_en = 0;
        h[8*5 + 2] = 100;
      end
      @(negedge clk); iv = 1; x = 10'($urandom);
      hist.push_back(x);
      @(negedge clk); iv = 0;
      for (int p = 0; p < 4; p++) begin
        longint ei, eq;
        ei = 0; eq = 0;
        for (int k = 0; k < 8; k++) begin
          ei += longint'(hist[hist.size()-1-k]) * h[8*k + 2*p];
          eq += longint'(hist[hist.size()-1-k]) * tx_rrc_coef(8*k + 2*p + 1, 0.22);
        end
        repeat (4) @(negedge clk);
        checks++;
        if (!vi || !vq || pi != 2'(p) || pq != 2'(p) || longint'(yi) != ei || longint'(yq) != eq) begin
          failures++; $display("m=%0d p=%0d v=%0d%0d got %0d,%0d exp %0d,%0d", m, p, vi, vq, yi, yq, ei, eq);
        end
      end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
