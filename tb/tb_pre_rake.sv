// tb_pre_rake: random chips and weights; compares the registered output with
// (w0*s[n] + w1*s[n-2]) / 64 computed here in integer complex arithmetic
// (floor division, saturation to 8 bits), one cycle after each enable.
module tb_pre_rake;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en; logic signed [3:0] sr, si; w8_t w0, w1; logic signed [7:0] yr, yi;
  pre_rake #(.IN_W(4), .OUT_W(8), .DELAY(2)) dut (.clk, .rst_n, .en, .s_re(sr), .s_im(si), .w0, .w1, .y_re(yr), .y_im(yi));
  int hr [$], hi [$];
  function automatic int fl64(int v); return (v >= 0) ? v / 64 : -((-v + 63) / 64); endfunction
  function automatic int sat8(int v); return v > 127 ? 127 : (v < -128 ? -128 : v); endfunction
  initial begin
    en = 0; sr = 0; si = 0; w0 = '0; w1 = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    hr = {0, 0}; hi = {0, 0};
    for (int n = 0; n < 2000; n++) begin
      int er, ei, dr, di;
      @(negedge clk);
      en = 1; sr = 4'($urandom_range(0, 8) - 4); si = 4'($urandom_range(0, 8) - 4);
      if (n % 100 == 0) begin
        w0 = '{re: 8'($urandom), im: 8'($urandom)}; w1 = '{re: 8'($urandom), im: 8'($urandom)};
      end
      dr = hr[hr.size()-2]; di = hi[hi.size()-2];
      er = sat8(fl64(sr*w0.re - si*w0.im + dr*w1.re - di*w1.im));
      ei = sat8(fl64(sr*w0.im + si*w0.re + dr*w1.im + di*w1.re));
      hr.push_back(sr); hi.push_back(si);
      @(negedge clk); en = 0;
      checks++;
      if (int'(yr) != er || int'(yi) != ei) begin failures++; $display("n=%0d got %0d,%0d exp %0d,%0d", n, yr, yi, er, ei); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
