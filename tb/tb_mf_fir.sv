// tb_mf_fir: random input samples; checks each output against a direct
// convolution computed here with the RRC taps (roll-off 0.22, 4 samples per
// chip, scale 128), floor-shifted by 9 and saturated to 12 bits. Also checks
// the centre tap value and symmetry of the taps.
module tb_mf_fir;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ov; logic signed [11:0] x, y;
  mf_fir dut (.clk, .rst_n, .in_valid(iv), .x, .y, .y_valid(ov));
  initial begin
    int hist [$];
    iv = 0; x = 0;
    checks++;
    if (rx_rrc_coef(8, 17, 0.22) != 136 || rx_rrc_coef(3, 17, 0.22) != rx_rrc_coef(13, 17, 0.22)) begin failures++; $display("taps wrong"); end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 17; k++) hist.push_back(0);
    for (int n = 0; n < 1500; n++) begin
      longint acc; int e;
      @(negedge clk); iv = 1; x = 12'($signed($urandom_range(0, 4000)) - 2000);
      hist.push_back(x);
      acc = 0;
      for (int k = 0; k < 17; k++) acc += longint'(hist[hist.size()-1-k]) * rx_rrc_coef(k, 17, 0.22);
      acc = acc >>> 9;
      e = acc > 2047 ? 2047 : (acc < -2048 ? -2048 : int'(acc));
      @(negedge clk); iv = 0;
      checks++;
      if (!ov || int'(y) != e) begin failures++; $display("n=%0d got %0d exp %0d", n, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
