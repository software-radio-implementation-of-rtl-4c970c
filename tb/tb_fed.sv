// tb_fed: feeds pilot symbols rotating by a fixed angle per symbol and checks
// the cross-product error Q[k]I[k-1]-I[k]Q[k-1] and the integrated frequency
// word against values computed here; a positive rotation must raise the word
// and a negative one lower it; no update while disabled.
module tb_fed;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, pv; logic signed [19:0] pr, pi; logic signed [40:0] err; logic signed [23:0] freq;
  fed #(.W(20), .FW(24), .GAIN_SH(12)) dut (.clk, .rst_n, .enable(en), .p_valid(pv), .p_re(pr), .p_im(pi), .err, .freq);
  initial begin
    longint pre, pim, e, f; real ang; bit have;
    en = 0; pv = 0; pr = 0; pi = 0; f = 0; have = 0; pre = 0; pim = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      real step;
      step = (n < 200) ? 0.05 : -0.08;
      ang = step * n;
      @(negedge clk);
      en = !(n >= 100 && n < 110);
      pv = 1;
      pr = 20'(int'($floor(20000.0 * $cos(ang))));
      pi = 20'(int'($floor(20000.0 * $sin(ang))));
      if (!en) have = 0;
      else begin
        if (have) begin
          e = longint'(pi) * pre - longint'(pr) * pim;
          f = f + (e >>> 12);
        end
        pre = pr; pim = pi; have = 1;
      end
      @(negedge clk); pv = 0;
      checks++;
      if (longint'(freq) != f) begin failures++; $display("n=%0d freq %0d exp %0d", n, freq, f); end
      if (n == 199) begin checks++; if (freq <= 0) begin failures++; $display("positive rotation not seen"); end end
    end
    checks++;
    if (freq >= f - 1 && freq > 0) ; else if (freq > 0) begin failures++; $display("negative rotation did not lower the word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
