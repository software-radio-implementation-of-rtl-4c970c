// tb_cdma_subsystem_top: end-to-end test of both links at the default size
// (16 downlink users). The testbench is the radio channel: it delays each
// transmitter's IF samples and feeds them to the receivers; the second uplink
// antenna gets an attenuated copy, and halfway through the run the
// attenuation moves to the first antenna so that the diversity selector must
// switch. The uplink delays are 42 and 46 IF samples (4k+2, which gives
// carrier phase 0 at the uplink despreader; the uplink has no phase
// recovery). All 16 users send random data; the mobile decodes user 0 (4
// channels, 256 kb/s). The uplink sends random bits, with the control bit
// multiplexed on Q in the second half. Received words are compared with the
// sent ones after finding the pipeline lag. Also counts: code-search slips,
// downlink/uplink locks, selections of each antenna, control bits, and a
// run-time coefficient RAM rewrite of the shaping filter (same value written).
module tb_cdma_subsystem_top;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int CYCLES = 2_400_000;

  logic [2*N_CH-1:0] ud [N_USERS];
  dl_user_cfg_t cfg [N_USERS];
  logic cw_en; logic [3:0] cw_addr;
  logic dl_sym_start, dl_locked, dl_dv, ul_sym_start;
  logic signed [IF_W-1:0] dl_if_tx, dl_if_rx, ul_if_tx, ul_if_rx_a, ul_if_rx_b;
  logic [6:0] ms_walsh [N_CH];
  logic [2*N_CH-1:0] dl_data;
  logic signed [23:0] dl_freq;
  logic ul_a, ul_b, ul_c, ctl_sel;
  logic la, lb, uv, rba, rbb, rcv, rc, selb;

  cdma_subsystem_top dut (
    .clk, .rst_n, .dl_user_data(ud), .dl_cfg(cfg), .dl_bpch_bits(2'b10), .cw_en, .cw_q(1'b0),
    .cw_side(1'b0), .cw_addr, .cw_data(10'(tx_rrc_coef(8 * 3 + 6, 0.22))), .dl_sym_start,
    .dl_if_tx, .dl_if_rx, .ms_walsh, .ms_n_ch(3'd4), .dl_locked, .dl_data_valid(dl_dv),
    .dl_data, .dl_freq, .ul_bit_a(ul_a), .ul_bit_b(ul_b), .ul_ctl(ul_c), .ul_ctl_sel(ctl_sel),
    .ul_freq(24'sd0), .ul_sym_start, .ul_if_tx, .ul_if_rx_a, .ul_if_rx_b, .bs_ctl_sel(ctl_sel),
    .ul_locked_a(la), .ul_locked_b(lb), .ul_valid(uv), .ul_rx_bit_a(rba), .ul_rx_bit_b(rbb),
    .ul_rx_ctl_valid(rcv), .ul_rx_ctl(rc), .ul_sel_b(selb));

  // radio channel: IF sample delays and attenuation
  logic signed [IF_W-1:0] dq [64], uq [64];
  logic second_half;
  always_ff @(posedge clk) if (dut.if_stb) begin
    dq[0] <= dl_if_tx; uq[0] <= ul_if_tx;
    for (int k = 1; k < 64; k++) begin dq[k] <= dq[k-1]; uq[k] <= uq[k-1]; end
  end
  assign dl_if_rx   = dq[37];
  assign ul_if_rx_a = second_half ? (uq[42] >>> 2) : uq[42];
  assign ul_if_rx_b = second_half ? uq[46] : (uq[46] >>> 2);

  // stimulus and logs
  logic [7:0] dl_sent [$], dl_got [$];
  logic [2:0] ul_sent [$], ul_got [$];
  int n_slip = 0, n_dl_lock = 0, n_ul_lock = 0, n_sel_a = 0, n_sel_b = 0, n_ctl = 0, n_cw = 0;
  logic dl_locked_q, la_q;
  always @(posedge clk) if (rst_n) begin
    if (dl_sym_start) begin
      dl_sent.push_back(ud[0]);
      for (int u = 0; u < N_USERS; u++) ud[u] <= 8'($urandom);
    end
    if (ul_sym_start) begin
      ul_sent.push_back({ctl_sel, ctl_sel ? ul_c : ul_b, ul_a});
      ul_a <= 1'($urandom); ul_b <= 1'($urandom); ul_c <= 1'($urandom);
    end
    if (dl_dv) dl_got.push_back(dl_data);
    if (uv) begin
      ul_got.push_back({ctl_sel, ctl_sel ? rc : rbb, rba});
      if (selb) n_sel_b++; else n_sel_a++;
      if (rcv) n_ctl++;
    end
    if (dut.u_dl_rx.slip_evt || dut.u_ul_rx_a.slip_evt) n_slip++;
    dl_locked_q <= dl_locked; la_q <= la;
    if (dl_locked && !dl_locked_q) n_dl_lock++;
    if (la && !la_q) n_ul_lock++;
    if (cw_en) n_cw++;
  end

  // best-lag comparison of a received word stream against the sent one
  task automatic compare8(string name, ref logic [7:0] s [$], ref logic [7:0] g [$], input int skip);
    int best = -1, best_lag = 0;
    for (int lag = 0; lag < 6; lag++) begin
      automatic int m = 0;
      for (int k = skip; k < g.size(); k++) begin
        automatic int j = int'(s.size()) - int'(g.size()) + k - lag;
        if (j >= 0 && s[j] == g[k]) m++;
      end
      if (m > best) begin best = m; best_lag = lag; end
    end
    checks++;
    for (int k = skip; k < g.size(); k++) begin
      automatic int j = int'(s.size()) - int'(g.size()) + k - best_lag;
      if (j >= 0 && s[j] != g[k]) $display("  %s mismatch at word %0d of %0d", name, k, g.size());
    end
    if (g.size() - skip < 20 || best < int'(g.size()) - skip) begin
      failures++;
      $display("%s: %0d of %0d words correct (lag %0d)", name, best, g.size() - skip, best_lag);
    end else $display("%s: %0d words correct", name, best);
  endtask

  task automatic compare3(string name, ref logic [2:0] s [$], ref logic [2:0] g [$], input int skip);
    logic [7:0] s8 [$], g8 [$];
    foreach (s[k]) s8.push_back(8'(s[k]));
    foreach (g[k]) g8.push_back(8'(g[k]));
    compare8(name, s8, g8, skip);
  endtask

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    for (int u = 0; u < N_USERS; u++) begin
      for (int c = 0; c < N_CH; c++) cfg[u].walsh[c] = 7'(4 * u + 4 + c);
      cfg[u].n_ch = 3'd4;
      cfg[u].w0 = '{re: 8'sd64, im: 8'sd0};
      cfg[u].w1 = '{re: 8'sd0, im: 8'sd0};
      cfg[u].gain_i = 8'd16; cfg[u].gain_q = 8'd16;
      ud[u] = '0;
    end
    for (int c = 0; c < N_CH; c++) ms_walsh[c] = 7'(4 + c);
    for (int k = 0; k < 64; k++) begin dq[k] = '0; uq[k] = '0; end
    ul_a = 0; ul_b = 0; ul_c = 0; ctl_sel = 0; second_half = 0; cw_en = 0; cw_addr = 4'd15;
    dl_locked_q = 0; la_q = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (CYCLES / 2) @(posedge clk);
    // second half: control bits on Q, antenna B stronger, coefficient rewrite
    @(posedge clk iff ul_sym_start);
    ctl_sel <= 1'b1; second_half <= 1'b1;
    cw_en <= 1'b1; @(posedge clk); cw_en <= 1'b0;
    repeat (CYCLES / 2) @(posedge clk);
    // received words after the first lock, skipping the settling symbols
    compare8("downlink user 0", dl_sent, dl_got, 128);
    begin
      logic [2:0] s1 [$], g1 [$], s2 [$], g2 [$];
      int ns = 0, ng = 0;
      foreach (ul_sent[k]) if (ul_sent[k][2]) s2.push_back(ul_sent[k]); else s1.push_back(ul_sent[k]);
      foreach (ul_got[k])  if (ul_got[k][2])  g2.push_back(ul_got[k]);  else g1.push_back(ul_got[k]);
      compare3("uplink first half", s1, g1, 100);
      compare3("uplink second half (control on Q)", s2, g2, 4);
    end
    count("code search slips", n_slip);
    count("downlink lock", n_dl_lock);
    count("uplink lock", n_ul_lock);
    count("diversity picks antenna A", n_sel_a);
    count("diversity picks antenna B", n_sel_b);
    count("control bits received", n_ctl);
    count("coefficient RAM writes", n_cw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
