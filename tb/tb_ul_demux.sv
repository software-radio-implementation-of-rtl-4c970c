// tb_ul_demux: random bit pairs in both modes; checks bit a, bit b or the
// control bit are routed per the MUX rule and held otherwise.
module tb_ul_demux;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, cs, ov, a, b, cv, c; logic [1:0] bits;
  ul_demux dut (.clk, .rst_n, .in_valid(iv), .bits, .ctl_sel(cs), .out_valid(ov), .bit_a(a), .bit_b(b), .ctl_valid(cv), .ctl(c));
  initial begin
    logic eb, ec;
    iv = 0; bits = 0; cs = 0; eb = 0; ec = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk); iv = 1; bits = 2'($urandom); cs = 1'($urandom);
      if (cs) ec = bits[1]; else eb = bits[1];
      @(negedge clk); iv = 0;
      checks++;
      if (!ov || a != bits[0] || b != eb || c != ec || cv != cs) begin failures++; $display("n=%0d wrong", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
