// tb_dl_ms_rx: the mobile downlink receiver at its default parameters, fed by
// a 4-user base-station transmitter through a delay line (the radio channel).
// Segment 1 uses a delay of 21 IF samples; then the signal is removed (the
// receiver must drop lock), and segment 2 uses a delay of 26 samples (new code
// phase, chip phase and carrier phase; the receiver must lock again, which
// takes up to one serial search over all 128 code phases). In each segment
// the received data words of user 0, from 24 symbols after the last lock on,
// must equal the sent words at one pipeline lag. The frequency estimate must
// stay small.
module tb_dl_ms_rx;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int SYM = 128 * CLK_PER_CHIP;
  logic if_stb, rx_stb, chip_stb, sym_start, locked, dv, slip;
  logic [7:0] ud [4]; dl_user_cfg_t cfg [4];
  logic signed [9:0] si, sq, if_tx, if_rx;
  logic [6:0] walsh [4]; logic [7:0] data; logic signed [19:0] hr, hi; logic signed [23:0] freq;
  logic [1:0] cph;
  rate_gen u_rate (.clk, .rst_n, .if_stb, .rx_stb, .chip_stb);
  dl_bs_tx #(.N_USERS(4)) u_tx (.clk, .rst_n, .chip_stb, .if_stb, .user_data(ud), .cfg, .bpch_bits(2'b01),
    .cw_en(1'b0), .cw_q(1'b0), .cw_side(1'b0), .cw_addr(4'd0), .cw_data(10'sd0), .sym_start,
    .sum_i(si), .sum_q(sq), .if_out(if_tx));
  dl_ms_rx dut (.clk, .rst_n, .if_stb, .if_in(if_rx), .walsh, .n_ch(3'd4), .locked, .data_valid(dv),
    .data, .h_re(hr), .h_im(hi), .freq, .chip_phase(cph), .slip_evt(slip));

  logic signed [9:0] dl [32];
  int delay, seg;
  bit on;
  always_ff @(posedge clk) if (if_stb) begin
    dl[0] <= if_tx;
    for (int k = 1; k < 32; k++) dl[k] <= dl[k-1];
  end
  assign if_rx = on ? dl[delay] : 10'sd0;

  logic [7:0] sent [2][$], got [2][$];
  int n_lock = 0, n_slip = 0, max_f = 0;
  int lock_word [2] = '{0, 0};
  logic locked_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (sym_start) begin
      if (seg >= 0) sent[seg].push_back(ud[0]);
      for (int u = 0; u < 4; u++) ud[u] <= 8'($urandom);
    end
    if (dv && seg >= 0) got[seg].push_back(data);
    if (slip) n_slip++;
    locked_q <= locked;
    if (locked && !locked_q) begin n_lock++; if (seg >= 0) lock_word[seg] = got[seg].size(); end
    if (locked && (freq > max_f || -freq > max_f)) max_f = (freq < 0) ? -freq : freq;
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
    for (int k = 0; k < got[s].size(); k++) begin
      int j = int'(sent[s].size()) - int'(got[s].size()) + k - best_lag;
      if (j >= 0 && sent[s][j] != got[s][k]) $display("  segment %0d word %0d of %0d wrong", s, k, got[s].size());
    end
    checks++;
    if (total < 40 || best != total) begin
      failures++; $display("segment %0d: %0d of %0d words correct", s, best, total);
    end
  endtask

  initial begin
    for (int u = 0; u < 4; u++) begin
      for (int c = 0; c < 4; c++) cfg[u].walsh[c] = 7'(4 * u + 4 + c);
      cfg[u].n_ch = 3'd4; cfg[u].w0 = '{re: 8'sd64, im: 8'sd0}; cfg[u].w1 = '0;
      cfg[u].gain_i = 8'd16; cfg[u].gain_q = 8'd16; ud[u] = '0;
    end
    for (int c = 0; c < 4; c++) walsh[c] = 7'(4 + c);
    for (int k = 0; k < 32; k++) dl[k] = '0;
    seg = -1; on = 1; delay = 21;
    repeat (3) @(negedge clk); rst_n = 1; seg = 0;
    repeat (160 * SYM) @(negedge clk);
    seg = -1; on = 0;
    repeat (30 * SYM) @(negedge clk);
    checks++;
    if (locked) begin failures++; $display("lock kept without signal"); end
    seg = 1; on = 1; delay = 26;
    repeat (300 * SYM) @(negedge clk);
    seg = -1;
    compare(0, lock_word[0] + 24);
    compare(1, lock_word[1] + 24);
    checks++;
    if (n_lock < 2 || n_slip == 0) begin failures++; $display("%0d locks, %0d slips", n_lock, n_slip); end
    checks++;
    if (max_f > 20000) begin failures++; $display("frequency estimate reached %0d", max_f); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (520 * SYM) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
