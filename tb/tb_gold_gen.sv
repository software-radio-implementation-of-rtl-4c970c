// tb_gold_gen: checks the Gold generator against a reference computed here by
// running the two 7-stage LFSR recurrences a[n+7]=a[n+3]^a[n] and
// b[n+7]=b[n+3]^b[n+2]^b[n+1]^b[n] from the seeds, including the reload every
// PERIOD chips, hold when 'en' is low, 'restart' and the position counter.
module tb_gold_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, restart, chip;
  logic [6:0] pos;
  gold_gen #(.PERIOD(128), .SEED_A(7'h01), .SEED_B(7'h55)) dut (.clk, .rst_n, .en, .restart, .chip, .pos);

  bit ref_seq [128];
  initial begin
    bit a [135], b [135];
    for (int i = 0; i < 7; i++) begin a[i] = (7'h01 >> i) & 1; b[i] = (7'h55 >> i) & 1; end
    for (int n = 0; n < 128; n++) begin
      a[n+7] = a[n+3] ^ a[n];
      b[n+7] = b[n+3] ^ b[n+2] ^ b[n+1] ^ b[n];
      ref_seq[n] = a[n] ^ b[n];
    end
  end

  initial begin
    int n;
    en = 0; restart = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    n = 0;
    for (int step = 0; step < 600; step++) begin
      #1;
      checks += 2;
      if (chip !== ref_seq[n % 128]) begin failures++; $display("chip %0d wrong", n); end
      if (pos != 7'(n % 128)) begin failures++; $display("pos %0d wrong", n); end
      en = ($urandom % 4) != 0;
      restart = (step == 400);
      @(posedge clk);
      if (restart) n = 0; else if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
