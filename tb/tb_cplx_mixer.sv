// tb_cplx_mixer: random samples and unit phasors; checks both rotation
// directions against floor((i*c +- q*s)/512) computed here, one cycle later.
module tb_cplx_mixer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ov0, ov1; logic signed [11:0] ii, qi, io0, qo0, io1, qo1; logic signed [9:0] c, s;
  cplx_mixer #(.W(12), .DIR(1'b0)) d0 (.clk, .rst_n, .in_valid(iv), .i_in(ii), .q_in(qi), .cos_i(c), .sin_i(s), .out_valid(ov0), .i_out(io0), .q_out(qo0));
  cplx_mixer #(.W(12), .DIR(1'b1)) d1 (.clk, .rst_n, .in_valid(iv), .i_in(ii), .q_in(qi), .cos_i(c), .sin_i(s), .out_valid(ov1), .i_out(io1), .q_out(qo1));
  function automatic int fl(int v); return (v >= 0) ? v / 512 : -((-v + 511) / 512); endfunction
  initial begin
    iv = 0; ii = 0; qi = 0; c = 0; s = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      real a;
      @(negedge clk);
      a = 6.2831853 * ($urandom % 1000) / 1000.0;
      iv = 1; ii = 12'($signed($urandom_range(0, 3000)) - 1500); qi = 12'($signed($urandom_range(0, 3000)) - 1500);
      c = 10'(int'($floor(511.0 * $cos(a)))); s = 10'(int'($floor(511.0 * $sin(a))));
      @(negedge clk); iv = 0;
      checks += 2;
      if (!ov0 || int'(io0) != fl(ii*c + qi*s) || int'(qo0) != fl(qi*c - ii*s)) begin failures++; $display("dir0 n=%0d", n); end
      if (!ov1 || int'(io1) != fl(ii*c - qi*s) || int'(qo1) != fl(qi*c + ii*s)) begin failures++; $display("dir1 n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
