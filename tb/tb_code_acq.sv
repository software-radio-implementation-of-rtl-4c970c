// tb_code_acq: the incoming chips are +-A times a Gold code (computed here from
// the LFSR recurrences, reloaded every 128 chips) starting at a random code
// phase, on I and Q with an arbitrary rotation, plus noise. The acquisition
// must lock within one search over all code phases, and then the local code
// chip must match the incoming chip's code and 'sym_end' must mark code
// position 127. The signal is then removed (lock must drop) and restored at
// a new phase (lock must return).
module tb_code_acq;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cv, locked, pn, se, ce, slip; logic [6:0] pos; rx_cplx_t chip;
  code_acq #(.SF(128)) dut (.clk, .rst_n, .chip_valid(cv), .chip, .locked, .pos, .pn, .sym_end(se), .chip_en(ce), .slip_evt(slip));
  bit code [128];
  int n_slips = 0;
  always @(posedge clk) if (slip) n_slips++;
  initial begin
    bit a [135], b [135];
    for (int i = 0; i < 7; i++) begin a[i] = (7'h01 >> i) & 1; b[i] = (7'h55 >> i) & 1; end
    for (int n = 0; n < 128; n++) begin
      a[n+7] = a[n+3] ^ a[n]; b[n+7] = b[n+3] ^ b[n+2] ^ b[n+1] ^ b[n]; code[n] = a[n] ^ b[n];
    end
  end
  task automatic run(int off, int nchips, bit on, bit expect_lock, int check_from);
    int k, good, bad;
    good = 0; bad = 0;
    for (int n = 0; n < nchips; n++) begin
      int idx, s, nr, ni;
      idx = (n + off) % 128;
      s = code[idx] ? -1 : 1;
      nr = $signed($urandom_range(0, 400)) - 200; ni = $signed($urandom_range(0, 400)) - 200;
      @(negedge clk);
      cv = 1;
      chip.re = RX_W'(on ? 300 * s + nr : nr);
      chip.im = RX_W'(on ? -500 * s + ni : ni);
      #1;
      if (n >= check_from && ce && expect_lock) begin
        if (locked && pn == code[idx] && (se == (idx == 127))) good++; else bad++;
      end
      @(negedge clk); cv = 0;
      repeat (2) @(negedge clk);
    end
    if (expect_lock) begin
      checks++;
      if (bad != 0 || good == 0) begin failures++; $display("offset %0d: %0d good %0d bad chips", off, good, bad); end
    end
  endtask
  initial begin
    int off;
    cv = 0; chip = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    off = $urandom_range(1, 127);
    run(off, 129 * 130, 1, 1, 129 * 129);
    checks++;
    if (n_slips == 0) begin failures++; $display("no search slips"); end
    run(0, 128 * 8, 0, 0, 0);
    checks++;
    if (locked) begin failures++; $display("lock not dropped without signal"); end
    off = $urandom_range(1, 127);
    run(off, 129 * 130, 1, 1, 129 * 129);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
