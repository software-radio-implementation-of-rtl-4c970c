// tb_nco: runs the oscillator with several frequency words (positive,
// negative) and checks every output against round(511*cos/sin(2*pi*k/256))
// of the top 8 bits of a phase accumulated here.
module tb_nco;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en; logic signed [23:0] freq; logic signed [9:0] c, s;
  nco dut (.clk, .rst_n, .en, .freq, .cos_o(c), .sin_o(s));
  initial begin
    logic [23:0] ph; int k, ec, es;
    en = 0; freq = 0; ph = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) freq = 24'($signed($urandom_range(0, 2000000)) - 1000000);
      k = int'(ph[23:16]);
      ec = int'($floor(511.0 * $cos(2.0 * 3.14159265358979 * k / 256.0) + 0.5));
      es = int'($floor(511.0 * $sin(2.0 * 3.14159265358979 * k / 256.0) + 0.5));
      checks++;
      if (int'(c) != ec || int'(s) != es) begin failures++; $display("n=%0d k=%0d got %0d,%0d exp %0d,%0d", n, k, c, s, ec, es); end
      en = ($urandom % 3) != 0;
      if (en) ph = ph + freq;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
