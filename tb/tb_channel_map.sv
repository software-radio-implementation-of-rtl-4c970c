// tb_channel_map: exhaustive check of the channel mapping: every data word and
// every active-channel count 0..4, against the rule bit 2c -> I of channel c,
// bit 2c+1 -> Q, 0 -> +1, 1 -> -1, inactive channels 0.
module tb_channel_map;
  int checks = 0, failures = 0;
  logic [7:0] data; logic [2:0] n_ch;
  logic signed [1:0] si [4], sq [4];
  channel_map #(.N_CH(4)) dut (.data, .n_ch, .sym_i(si), .sym_q(sq));
  initial begin
    for (int n = 0; n <= 4; n++)
      for (int d = 0; d < 256; d++) begin
        data = 8'(d); n_ch = 3'(n); #1;
        for (int c = 0; c < 4; c++) begin
          int ei, eq;
          ei = (c >= n) ? 0 : (((d >> (2*c)) & 1) ? -1 : 1);
          eq = (c >= n) ? 0 : (((d >> (2*c+1)) & 1) ? -1 : 1);
          checks++;
          if (int'(si[c]) != ei || int'(sq[c]) != eq) begin
            failures++; $display("d=%h n=%0d c=%0d got %0d,%0d", d, n, c, si[c], sq[c]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
