// channel_unmap: inverse of the downlink channel mapping. Collects the bit
// decisions of the user's active channels into the data word (bit 2c: I of
// channel c, bit 2c+1: Q) and clears the bits of channels at or above n_ch.
// Same bit order as channel_map (this design's choice).
// Timing: registered; 'out_valid' one cycle after 'in_valid'.
module channel_unmap #(
  parameter int N_CH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [2*N_CH-1:0] bits,
  input  logic [2:0]        n_ch,
  output logic              out_valid,
  output logic [2*N_CH-1:0] data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < N_CH; c++)
          data[2*c +: 2] <= (c < int'(n_ch)) ? bits[2*c +: 2] : 2'b00;
    end
  end
endmodule
