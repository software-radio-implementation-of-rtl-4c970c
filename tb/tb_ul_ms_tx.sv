// tb_ul_ms_tx: the uplink transmitter run from rate_gen strobes with random
// bits (new values on every chip; only those at chip 0 count) and the control
// select toggled every few symbols. Checks, per chip:
//  - 'sym_start' every 32 chips, at code position 0;
//  - the rotated chip (observed inside the transmitter, after the NCO mixer)
//    has the sign of the multiplexed bit times the mobile's Gold code
//    (computed here from the LFSR recurrences, seeds 01/10) when freq = 0;
//  - with a frequency word set, the chip magnitude stays AMP and its phase
//    advances by 2*pi*freq/2^24 per chip (within two table steps
//    per chip, and on average within 0.003 rad).
// The IF output must be active and rarely clipped.
module tb_ul_ms_tx;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic if_stb, rx_stb, chip_stb, ss, ba, bb, ctl, csel;
  logic signed [23:0] freq; logic signed [9:0] ifo;
  rate_gen u_rate (.clk, .rst_n, .if_stb, .rx_stb, .chip_stb);
  ul_ms_tx dut (.clk, .rst_n, .chip_stb, .if_stb, .bit_a(ba), .bit_b(bb), .ctl, .ctl_sel(csel), .freq,
                .sym_start(ss), .if_out(ifo));
  int n_if = 0, n_clip = 0; longint e_if = 0;
  always @(posedge clk) if (rst_n && if_stb) begin
    n_if++; e_if += longint'(ifo) * ifo;
    if (ifo == 10'sd511 || ifo == -10'sd512) n_clip++;
  end
  initial begin
    bit a [39], b [39], code [32];
    logic si, sq;
    int pos;
    real prev_th, step, sum_d;
    int n_d;
    for (int i = 0; i < 7; i++) begin a[i] = (7'h01 >> i) & 1; b[i] = (7'h10 >> i) & 1; end
    for (int n = 0; n < 32; n++) begin
      a[n+7] = a[n+3] ^ a[n]; b[n+7] = b[n+3] ^ b[n+2] ^ b[n+1] ^ b[n]; code[n] = a[n] ^ b[n];
    end
    ba = 0; bb = 0; ctl = 0; csel = 0; freq = 0; pos = 0; prev_th = 0.0; sum_d = 0.0; n_d = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 60 * 32; n++) begin
      int ei, eq;
      real th, mag, d;
      while (!chip_stb) @(negedge clk);
      if (n == 30 * 32) freq = 24'sd40000;
      step = 2.0 * PI * real'(freq) / 16777216.0;
      ba = 1'($urandom); bb = 1'($urandom); ctl = 1'($urandom);
      if (pos == 0) begin
        csel = (n / 128) % 2;
        si = ba; sq = csel ? ctl : bb;
      end
      checks++;
      if (ss != (pos == 0)) begin failures++; $display("chip %0d: sym_start %0b", n, ss); end
      ei = (si ^ code[pos]) ? -64 : 64;
      eq = (sq ^ code[pos]) ? -64 : 64;
      @(negedge clk);
      // r / e, with e = ei + j eq of magnitude 64*sqrt(2)
      th = $atan2(real'(dut.rq) * ei - real'(dut.ri) * eq, real'(dut.ri) * ei + real'(dut.rq) * eq);
      mag = $sqrt(real'(dut.ri) ** 2 + real'(dut.rq) ** 2) / (64.0 * $sqrt(2.0));
      checks++;
      if (!dut.rv || mag < 0.95 || mag > 1.03) begin
        failures++; if (failures < 10) $display("chip %0d: magnitude %f valid %0b", n, mag, dut.rv);
      end
      if (freq == 0) begin
        checks++;
        if (th > 0.05 || th < -0.05) begin failures++; if (failures < 10) $display("chip %0d: phase %f", n, th); end
      end else if (n > 30 * 32 + 1) begin
        d = th - prev_th - step;
        while (d > PI) d -= 2.0 * PI;
        while (d < -PI) d += 2.0 * PI;
        checks++;
        sum_d += d; n_d++;
        if (d > 0.06 || d < -0.06) begin failures++; if (failures < 10) $display("chip %0d: step error %f", n, d); end
      end
      prev_th = th;
      pos = (pos + 1) % 32;
    end
    checks++;
    if (n_d < 100 || sum_d / n_d > 0.003 || sum_d / n_d < -0.003) begin
      failures++; $display("mean phase step error %f over %0d chips", sum_d / n_d, n_d);
    end
    checks++;
    if (e_if / n_if < 100 || n_clip * 100 > n_if) begin
      failures++; $display("IF: mean power %0d, %0d of %0d clipped", e_if / n_if, n_clip, n_if);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
