// tb_hb_decim_fir: random 10-bit samples, one every 4 cycles. Every second
// output is compared with the exact convolution sum(h_k x[n-k]) / 8 / 2^7
// computed here (11-tap half-band, centre 2048), allowing 1 LSB for the
// multipliers' truncation. Checks the zero odd taps, the 4-cycle latency and
// that exactly one output follows every two inputs.
module tb_hb_decim_fir;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ov; logic signed [9:0] x; logic signed [11:0] y;
  hb_decim_fir dut (.clk, .rst_n, .in_valid(iv), .x, .y, .y_valid(ov));
  int hist [$];
  int nout = 0, nin = 0;
  initial begin
    iv = 0; x = 0;
    checks++;
    if (hb_coef(5, 11, 4096.0) != 2048 || hb_coef(1, 11, 4096.0) != 0 || hb_coef(3, 11, 4096.0) != 0 ||
        hb_coef(4, 11, 4096.0) != hb_coef(6, 11, 4096.0)) begin failures++; $display("taps wrong"); end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 11; k++) hist.push_back(0);
    for (int n = 0; n < 2000; n++) begin
      real acc; int e;
      @(negedge clk); iv = 1; x = 10'($urandom); nin++;
      hist.push_back(x);
      @(negedge clk); iv = 0;
      repeat (2) @(negedge clk);
      // the output (if any) for this input is valid 4 cycles after it
      acc = 0.0;
      for (int k = 0; k < 11; k++) acc += real'(hist[hist.size()-1-k]) * real'(hb_coef(k, 11, 4096.0)) / 8.0;
      e = int'($floor(acc / 128.0));
      e = e > 2047 ? 2047 : (e < -2048 ? -2048 : e);
      repeat (2) @(negedge clk);
      if (ov) begin
        nout++;
        checks++;
        if (int'(y) - e > 1 || e - int'(y) > 1) begin failures++; $display("n=%0d got %0d exp %0d", n, y, e); end
      end
    end
    checks++;
    if (nout != nin / 2) begin failures++; $display("outputs %0d for %0d inputs", nout, nin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
