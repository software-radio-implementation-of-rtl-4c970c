// tb_channel_unmap: random bit words and channel counts; checks that active
// channels' bit pairs pass, inactive ones are cleared, with one cycle latency.
module tb_channel_unmap;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ov; logic [7:0] bits, data; logic [2:0] n_ch;
  channel_unmap #(.N_CH(4)) dut (.clk, .rst_n, .in_valid(iv), .bits, .n_ch, .out_valid(ov), .data);
  initial begin
    iv = 0; bits = 0; n_ch = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [7:0] e;
      @(negedge clk); iv = 1; bits = 8'($urandom); n_ch = 3'($urandom_range(0, 4));
      e = bits & 8'((1 << (2 * n_ch)) - 1);
      @(negedge clk); iv = 0;
      checks++;
      if (!ov || data != e) begin failures++; $display("bits=%h n=%0d data=%h", bits, n_ch, data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
