// tb_iq_demod_fs4: random IF samples (including -512); checks the fs/4
// pattern I = +x,0,-x,0 and Q = 0,-x,0,+x with saturation of -(-512).
module tb_iq_demod_fs4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ov; logic signed [9:0] x, io, qo;
  iq_demod_fs4 dut (.clk, .rst_n, .in_valid(iv), .x, .out_valid(ov), .i_out(io), .q_out(qo));
  function automatic int neg(int v); return v == -512 ? 511 : -v; endfunction
  initial begin
    int ei, eq;
    iv = 0; x = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk); iv = 1; x = (n % 50 == 7) ? -10'sd512 : 10'($urandom);
      case (n % 4)
        0: begin ei = x; eq = 0; end
        1: begin ei = 0; eq = neg(x); end
        2: begin ei = neg(x); eq = 0; end
        default: begin ei = 0; eq = x; end
      endcase
      @(negedge clk); iv = 0;
      checks++;
      if (!ov || int'(io) != ei || int'(qo) != eq) begin failures++; $display("n=%0d got %0d,%0d exp %0d,%0d", n, io, qo, ei, eq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
