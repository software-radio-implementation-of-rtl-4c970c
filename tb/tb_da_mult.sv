// tb_da_mult: self-checking testbench of the distributed-arithmetic constant
// multiplier. Drives every 10-bit input value (and random back-to-back
// starts) for a positive and a negative coefficient and compares p with
// C*x/8 computed here with integer arithmetic, allowing the truncation error
// of the three 2^-3 shifts (at most 2 LSB). Also checks the 4-cycle latency.
module tb_da_mult;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start; logic signed [9:0] x;
  logic signed [21:0] p_pos, p_neg;
  logic done_pos, done_neg;
  da_mult #(.C(2123))             u_pos (.clk, .rst_n, .start, .x, .p(p_pos), .done(done_pos));
  da_mult #(.C(1177), .NEG(1'b1)) u_neg (.clk, .rst_n, .start, .x, .p(p_neg), .done(done_neg));

  task automatic check(input int xv);
    int exp_pos, exp_neg, lat;
    exp_pos = (2123 * xv) / 8;
    exp_neg = -(1177 * xv) / 8;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done_pos);
    checks += 3;
    if (lat != 4) begin failures++; $display("latency %0d", lat); end
    if (int'(p_pos) - exp_pos > 2 || exp_pos - int'(p_pos) > 2) begin
      failures++; $display("x=%0d p=%0d exp=%0d", xv, p_pos, exp_pos);
    end
    if (int'(p_neg) - exp_neg > 2 || exp_neg - int'(p_neg) > 2) begin
      failures++; $display("x=%0d neg p=%0d exp=%0d", xv, p_neg, exp_neg);
    end
  endtask

  initial begin
    start = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int v = -512; v < 512; v++) begin
      #1 start = 1'b1; x = 10'(v);
      @(posedge clk); #1 start = 1'b0;
      check(v);
      // done cycle: p readable; the next start follows on the next cycle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
