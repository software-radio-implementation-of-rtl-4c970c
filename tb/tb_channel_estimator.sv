// tb_channel_estimator: feeds pilot symbols and checks the estimate against
// h <- h + floor((P-h)/2^K) computed here (first symbol loads), that 'clear'
// restarts the average, and that a constant pilot is reached.
module tb_channel_estimator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, pv, hv; logic signed [19:0] pr, pi, hr, hi;
  channel_estimator #(.W(20), .K(4)) dut (.clk, .rst_n, .clear(clr), .p_valid(pv), .p_re(pr), .p_im(pi), .h_re(hr), .h_im(hi), .h_valid(hv));
  function automatic int fdiv16(int v); return (v >= 0) ? v / 16 : -((-v + 15) / 16); endfunction
  initial begin
    int er, ei; bit first;
    clr = 0; pv = 0; pr = 0; pi = 0; first = 1; er = 0; ei = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      clr = (n == 300);
      pv = !clr;
      pr = 20'((n < 450) ? $signed($urandom_range(0, 20000)) - 10000 : 5000);
      pi = 20'((n < 450) ? $signed($urandom_range(0, 20000)) - 10000 : -3000);
      if (clr) first = 1;
      else if (first) begin er = pr; ei = pi; first = 0; end
      else begin er = er + fdiv16(pr - er); ei = ei + fdiv16(pi - ei); end
      @(negedge clk); pv = 0; clr = 0;
      checks++;
      if (int'(hr) != er || int'(hi) != ei) begin failures++; $display("n=%0d got %0d,%0d exp %0d,%0d", n, hr, hi, er, ei); end
    end
    checks++;
    if (hr < 4980 || hr > 5020 || hi < -3020 || hi > -2980) begin failures++; $display("no convergence %0d %0d", hr, hi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
