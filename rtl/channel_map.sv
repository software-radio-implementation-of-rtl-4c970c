// channel_map: downlink channel mapping of one user.
//
// A user carries up to N_CH QPSK channels, each with its own Walsh code. Once
// per symbol the user's data word gives two bits per channel: bit 2c is the I
// bit and bit 2c+1 the Q bit of channel c. Bit 0 maps to +1 and bit 1 to -1;
// channels at or above n_ch are switched off (symbol 0). The bit order and the
// switching rule are this design's choice. Purely combinational.
module channel_map #(
  parameter int N_CH = 4
) (
  input  logic [2*N_CH-1:0]      data,
  input  logic [2:0]             n_ch,
  output logic signed [1:0]      sym_i [N_CH],
  output logic signed [1:0]      sym_q [N_CH]
);
  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      if (c < int'(n_ch)) begin
        sym_i[c] = data[2*c]   ? -2'sd1 : 2'sd1;
        sym_q[c] = data[2*c+1] ? -2'sd1 : 2'sd1;
      end else begin
        sym_i[c] = 2'sd0;
        sym_q[c] = 2'sd0;
      end
    end
  end
endmodule
