// tb_iq_mod_fs4: loads random filter phases into the modulator each chip and
// checks the IF sample stream of the following chip: +I0,-Q0,-I1,+Q1,+I2,-Q2,
// -I3,+Q3, each shifted right by 5 and saturated to 10 bits. Uses the same
// 4-clock IF / 32-clock chip strobes as the subsystem.
module tb_iq_mod_fs4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic chip_stb, if_stb, iv, qv; logic [1:0] ip, qp; logic signed [22:0] id, qd; logic signed [9:0] ifo;
  iq_mod_fs4 #(.AW(23), .SHIFT(5)) dut (.clk, .rst_n, .chip_stb, .if_stb, .i_valid(iv), .i_phase(ip), .i_data(id),
    .q_valid(qv), .q_phase(qp), .q_data(qd), .if_out(ifo));
  int cnt = 0;
  int iv_s [4], qv_s [4], exp_q [$], pend_q [$];
  always @(posedge clk) if (chip_stb) while (pend_q.size() > 0) exp_q.push_back(pend_q.pop_front());
  function automatic int sat(int v); v = v >>> 5; return v > 511 ? 511 : (v < -512 ? -512 : v); endfunction
  always_ff @(posedge clk) if (rst_n) cnt <= (cnt + 1) % 32;
  assign chip_stb = rst_n && cnt == 0;
  assign if_stb = rst_n && cnt % 4 == 0;
  initial begin
    iv = 0; qv = 0; ip = 0; qp = 0; id = 0; qd = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 200; m++) begin
      @(negedge clk iff cnt == 5);
      for (int p = 0; p < 4; p++) begin
        iv_s[p] = $signed($urandom_range(0, 40000)) - 20000;
        qv_s[p] = $signed($urandom_range(0, 40000)) - 20000;
        iv = 1; qv = 1; ip = 2'(p); qp = 2'(p); id = 23'(iv_s[p]); qd = 23'(qv_s[p]);
        @(negedge clk);
      end
      iv = 0; qv = 0;
      for (int p = 0; p < 4; p++) begin
        pend_q.push_back(sat((p % 2) ? -iv_s[p] : iv_s[p]));
        pend_q.push_back(sat((p % 2) ? qv_s[p] : -qv_s[p]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // the IF sample of strobe cnt=4j appears after the edge at cnt=4j+1
  always @(negedge clk) if (rst_n && cnt % 4 == 2 && exp_q.size() > 0) begin
    checks++;
    if (int'(ifo) != exp_q[0]) begin failures++; $display("got %0d exp %0d", ifo, exp_q[0]); end
    void'(exp_q.pop_front());
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
