// tb_diversity_select: random soft symbols from two receivers; checks that the
// one with the larger |re|+|im| (among locked receivers) supplies the sign
// bits, and that an unlocked receiver is never chosen.
module tb_diversity_select;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic av, al, bv, bl, ov, sb; logic [1:0] bits;
  logic signed [36:0] ar, ai, br, bi;
  diversity_select #(.ZW(37)) dut (.clk, .rst_n, .a_valid(av), .a_locked(al), .a_re(ar), .a_im(ai),
    .b_valid(bv), .b_locked(bl), .b_re(br), .b_im(bi), .out_valid(ov), .bits, .sel_b(sb));
  function automatic longint mag(longint r, longint i); return (r < 0 ? -r : r) + (i < 0 ? -i : i); endfunction
  initial begin
    av = 0; bv = 0; al = 0; bl = 0; ar = 0; ai = 0; br = 0; bi = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      longint ma, mb; logic eb; logic [1:0] ebits;
      @(negedge clk); bv = 1; bl = ($urandom % 8) != 0;
      br = 37'($signed($urandom_range(0, 200000)) - 100000); bi = 37'($signed($urandom_range(0, 200000)) - 100000);
      @(negedge clk); bv = 0; av = 1; al = ($urandom % 8) != 0 || !bl;
      ar = 37'($signed($urandom_range(0, 200000)) - 100000); ai = 37'($signed($urandom_range(0, 200000)) - 100000);
      ma = al ? mag(ar, ai) : 0; mb = bl ? mag(br, bi) : 0;
      eb = mb > ma;
      ebits = eb ? {bi < 0, br < 0} : {ai < 0, ar < 0};
      @(negedge clk); av = 0;
      checks++;
      if (!ov || sb != eb || bits != ebits) begin failures++; $display("n=%0d sel=%0d exp %0d", n, sb, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
