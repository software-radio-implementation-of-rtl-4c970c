// tb_ul_bs_rx: the base-station uplink receiver at its default parameters,
// fed by the uplink transmitter through a delay line (the radio channel).
// Segment 1 uses a delay of 42 IF samples; then the signal is removed (the
// receiver must drop lock), and segment 2 uses a delay of 54 samples (new code
// and chip phase). The uplink receiver has no carrier-phase recovery, so both
// delays are 4k+2 samples: with the pipelines of transmitter and receiver this
// gives a carrier phase of 0 at the despreader (4k would give 180 degrees). Random bits are sent, with the control bit on Q in every
// other block of 64 symbols. In each segment the received bit pairs, from 32
// symbols after the last lock on, must equal the sent ones at one pipeline
// lag, and the soft values must agree in sign with the bits.
module tb_ul_bs_rx;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int SYM = UL_SF * CLK_PER_CHIP;
  logic if_stb, rx_stb, chip_stb, sym_start, locked, sv, slip, ba, bb, ctl, csel;
  logic signed [9:0] if_tx, if_rx;
  logic [1:0] bits; logic signed [36:0] zr, zi;
  rate_gen u_rate (.clk, .rst_n, .if_stb, .rx_stb, .chip_stb);
  ul_ms_tx u_tx (.clk, .rst_n, .chip_stb, .if_stb, .bit_a(ba), .bit_b(bb), .ctl, .ctl_sel(csel),
    .freq(24'sd0), .sym_start, .if_out(if_tx));
  ul_bs_rx dut (.clk, .rst_n, .if_stb, .if_in(if_rx), .locked, .sym_valid(sv), .bits, .z_re(zr),
    .z_im(zi), .slip_evt(slip));

  logic signed [9:0] dl [64];
  int delay, seg;
  bit on;
  always_ff @(posedge clk) if (if_stb) begin
    dl[0] <= if_tx;
    for (int k = 1; k < 64; k++) dl[k] <= dl[k-1];
  end
  assign if_rx = on ? dl[delay] : 10'sd0;

  logic [1:0] sent [2][$], got [2][$];
  int n_lock = 0, n_slip = 0, n_sym = 0, bad_sign = 0;
  int lock_word [2] = '{0, 0};
  logic locked_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (sym_start) begin
      if (seg >= 0) sent[seg].push_back({csel ? ctl : bb, ba});
      ba <= 1'($urandom); bb <= 1'($urandom); ctl <= 1'($urandom);
      n_sym++;
      csel <= (n_sym / 64) % 2;
    end
    if (sv && seg >= 0) got[seg].push_back(bits);
    if (sv && locked && (bits[0] != zr[36] || bits[1] != zi[36])) bad_sign++;
    if (slip) n_slip++;
    locked_q <= locked;
    if (locked && !locked_q) begin n_lock++; if (seg >= 0) lock_word[seg] = got[seg].size(); end
  end

  task automatic compare(int s, int skip);
    int best = -1, best_lag = 0, total;
    total = int'(got[s].size()) - skip;
    for (int lag = 0; lag < 6; lag++) begin
      int m = 0;
      for (int k = skip; k < got[s].size(); k++) begin
        int j = int'(sent[s].size()) - int'(got[s].size()) + k - lag;
        if (j >= 0 && sent[s][j] == got[s][k]) m++;
      end
      if (m > best) begin best = m; best_lag = lag; end
    end
    checks++;
    if (total < 100 || best != total) begin
      failures++; $display("segment %0d: %0d of %0d bit pairs correct", s, best, total);
    end
  endtask

  initial begin
    for (int k = 0; k < 64; k++) dl[k] = '0;
    ba = 0; bb = 0; ctl = 0; csel = 0;
    seg = -1; on = 1; delay = 42;
    repeat (3) @(negedge clk); rst_n = 1; seg = 0;
    repeat (500 * SYM) @(negedge clk);
    seg = -1; on = 0;
    repeat (100 * SYM) @(negedge clk);
    checks++;
    if (locked) begin failures++; $display("lock kept without signal"); end
    seg = 1; on = 1; delay = 54;
    repeat (500 * SYM) @(negedge clk);
    seg = -1;
    compare(0, lock_word[0] + 32);
    compare(1, lock_word[1] + 32);
    checks++;
    if (n_lock < 2 || n_slip == 0) begin failures++; $display("%0d locks, %0d slips", n_lock, n_slip); end
    checks++;
    if (bad_sign != 0) begin failures++; $display("%0d decisions disagree with the soft values", bad_sign); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1200 * SYM) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
