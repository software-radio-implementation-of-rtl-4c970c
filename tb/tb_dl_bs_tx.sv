// tb_dl_bs_tx: the full 16-user downlink transmitter, run from rate_gen
// strobes. Every user gets a random configuration (Walsh rows, 0..4 channels,
// gains; unit pre-RAKE) and new random data on every chip (only the word at
// chip 0 counts). The model here produces the cell Gold code from the two
// LFSR recurrences, spreads every user and adds the pilot and broadcast chips;
// the saturated branch sums are compared with sum_i/sum_q after every chip.
// 'sym_start' must coincide with code position 0. The IF output is checked to
// be active and rarely clipped (shaping and IF stages have their own tests).
module tb_dl_bs_tx;
  import cdma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic if_stb, rx_stb, chip_stb, sym_start;
  logic [7:0] ud [16]; dl_user_cfg_t cfg [16]; logic [1:0] bb;
  logic signed [9:0] si, sq, ifo;
  rate_gen u_rate (.clk, .rst_n, .if_stb, .rx_stb, .chip_stb);
  dl_bs_tx dut (.clk, .rst_n, .chip_stb, .if_stb, .user_data(ud), .cfg, .bpch_bits(bb), .cw_en(1'b0),
    .cw_q(1'b0), .cw_side(1'b0), .cw_addr(4'd0), .cw_data(10'sd0), .sym_start, .sum_i(si), .sum_q(sq),
    .if_out(ifo));
  bit code [128];
  function automatic int fdiv(int v, int d); return (v >= 0) ? v / d : -((-v + d - 1) / d); endfunction
  function automatic int sat(int v, int m); return v > m ? m : (v < -m - 1 ? -m - 1 : v); endfunction
  int n_if = 0, n_clip = 0; longint e_if = 0;
  always @(posedge clk) if (rst_n && if_stb) begin
    n_if++; e_if += longint'(ifo) * ifo;
    if (ifo == 10'sd511 || ifo == -10'sd512) n_clip++;
  end
  initial begin
    bit a [135], b [135];
    logic [7:0] dsym [16]; logic [1:0] bsym;
    int pos;
    for (int i = 0; i < 7; i++) begin a[i] = (7'h01 >> i) & 1; b[i] = (7'h55 >> i) & 1; end
    for (int n = 0; n < 128; n++) begin
      a[n+7] = a[n+3] ^ a[n]; b[n+7] = b[n+3] ^ b[n+2] ^ b[n+1] ^ b[n]; code[n] = a[n] ^ b[n];
    end
    for (int u = 0; u < 16; u++) begin
      for (int c = 0; c < 4; c++) cfg[u].walsh[c] = 7'($urandom_range(2, 127));
      cfg[u].n_ch = 3'($urandom_range(0, 4));
      cfg[u].w0 = '{re: 8'd64, im: 8'd0}; cfg[u].w1 = '0;
      cfg[u].gain_i = 8'($urandom_range(0, 20)); cfg[u].gain_q = 8'($urandom_range(0, 20));
      ud[u] = 0;
    end
    bb = 0; pos = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 20 * 128; n++) begin
      int ei, eq;
      while (!chip_stb) @(negedge clk);
      for (int u = 0; u < 16; u++) ud[u] = 8'($urandom);
      bb = 2'($urandom);
      checks++;
      if (sym_start != (pos == 0)) begin failures++; $display("chip %0d: sym_start %0b", n, sym_start); end
      if (pos == 0) begin dsym = ud; bsym = bb; end
      ei = (code[pos] ? -32 : 32) + (((bsym[0] ^ pos[0] ^ code[pos]) != 0) ? -8 : 8);
      eq = ((bsym[1] ^ pos[0] ^ code[pos]) != 0) ? -8 : 8;
      for (int u = 0; u < 16; u++) begin
        int s_re, s_im;
        s_re = 0; s_im = 0;
        for (int c = 0; c < 4; c++) begin
          int sg;
          sg = (^(cfg[u].walsh[c] & 7'(pos)) ^ code[pos]) ? -1 : 1;
          if (c < cfg[u].n_ch) begin
            s_re += dsym[u][2*c] ? -sg : sg;
            s_im += dsym[u][2*c+1] ? -sg : sg;
          end
        end
        ei += sat(fdiv(s_re * cfg[u].gain_i, 4), 511);
        eq += sat(fdiv(s_im * cfg[u].gain_q, 4), 511);
      end
      ei = sat(ei, 511); eq = sat(eq, 511);
      @(negedge clk);
      checks++;
      if (int'(si) != ei || int'(sq) != eq) begin
        failures++;
        if (failures < 10) $display("chip %0d: sums %0d,%0d exp %0d,%0d", n, si, sq, ei, eq);
      end
      pos = (pos + 1) % 128;
    end
    checks++;
    if (e_if / n_if < 100 || n_clip * 100 > n_if) begin
      failures++; $display("IF: mean power %0d, %0d of %0d clipped", e_if / n_if, n_clip, n_if);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
