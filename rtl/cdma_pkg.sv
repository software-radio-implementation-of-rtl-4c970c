// cdma_pkg: constants, types and elaboration-time functions shared by the
// DS-CDMA transmit and receive chains.
//
// Rates follow the system description: IF sampled at 32768 kHz with the carrier
// at 8192 kHz (fs/4), chips at 4096 kchip/s, downlink spreading factor 128 and
// uplink spreading factor 32, up to 4 QPSK channels per user and 16 users.
// The single system clock of 131072 kHz (4 clocks per IF sample, 32 per chip)
// is this design's choice. Filter coefficients are computed here from their
// formulas (root-raised cosine, windowed half-band) so that no table is stored.
package cdma_pkg;

  localparam int CLK_PER_IF   = 4;    // system clocks per 32768 kHz IF sample
  localparam int CLK_PER_CHIP = 32;   // system clocks per 4096 kHz chip
  localparam int DL_SF        = 128;  // downlink spreading factor
  localparam int UL_SF        = 32;   // uplink spreading factor
  localparam int N_CH         = 4;    // QPSK channels per user (downlink)
  localparam int N_USERS      = 16;   // users per base station
  localparam int IF_W         = 10;   // IF sample width (DAC/ADC)
  localparam int CHIP_W       = 10;   // chip width into the shaping filter
  localparam int RX_W         = 12;   // receiver baseband sample width

  localparam real PI = 3.14159265358979323846;

  // Complex baseband sample of the receiver.
  typedef struct packed {
    logic signed [RX_W-1:0] re;
    logic signed [RX_W-1:0] im;
  } rx_cplx_t;

  // Complex 8-bit weight (pre-RAKE), 64 means 1.0.
  typedef struct packed {
    logic signed [7:0] re;
    logic signed [7:0] im;
  } w8_t;

  // Downlink per-user configuration written by the host.
  typedef struct packed {
    logic [3:0][6:0] walsh;   // Walsh index of each of the 4 channels
    logic [2:0]      n_ch;    // active channels 0..4
    w8_t             w0;      // pre-RAKE weight, direct path
    w8_t             w1;      // pre-RAKE weight, delayed path
    logic [7:0]      gain_i;  // w_i, 16 = unity
    logic [7:0]      gain_q;  // w_j, 16 = unity
  } dl_user_cfg_t;

  // Chip of Walsh (Sylvester-Hadamard) row idx at position pos: 1 means -1.
  function automatic logic walsh_chip(input logic [6:0] idx, input logic [6:0] pos);
    return ^(idx & pos);
  endfunction

  // Root-raised-cosine impulse response, t in chips, roll-off beta.
  function automatic real rrc(input real t, input real beta);
    real den, d;
    if (t == 0.0) return 1.0 - beta + 4.0 * beta / PI;
    d = (t * t - 1.0 / (16.0 * beta * beta));
    if (d < 1.0e-9 && d > -1.0e-9)
      return beta / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * beta)) +
                                  (1.0 - 2.0 / PI) * $cos(PI / (4.0 * beta)));
    den = PI * t * (1.0 - (4.0 * beta * t) * (4.0 * beta * t));
    return ($sin(PI * t * (1.0 - beta)) + 4.0 * beta * t * $cos(PI * t * (1.0 + beta))) / den;
  endfunction

  function automatic int rnd(input real v);
    return int'($floor(v + 0.5));
  endfunction

  // Transmit RRC tap n (0..63) of the 64-tap filter at 8 samples per chip,
  // centred between taps 31 and 32, scaled by 256.
  function automatic int tx_rrc_coef(input int n, input real beta);
    return rnd(256.0 * rrc((real'(n) - 31.5) / 8.0, beta));
  endfunction

  // Receive matched RRC tap n of an NTAPS filter at 4 samples per chip, scale 128.
  function automatic int rx_rrc_coef(input int n, input int ntaps, input real beta);
    return rnd(128.0 * rrc((real'(n) - real'(ntaps - 1) / 2.0) / 4.0, beta));
  endfunction

  // Half-band tap n of an NTAPS (4k+3) filter, Hamming window, scale 'scale'.
  // Centre tap is scale/2 and every other tap off the centre is zero.
  function automatic int hb_coef(input int n, input int ntaps, input real scale);
    real m, w, s;
    m = real'(n) - real'(ntaps - 1) / 2.0;
    if (m == 0.0) return rnd(scale / 2.0);
    if (n % 2 == ((ntaps - 1) / 2) % 2) return 0;
    w = 0.54 + 0.46 * $cos(2.0 * PI * m / real'(ntaps + 1));
    s = $sin(PI * m / 2.0) / (PI * m);
    return rnd(scale * s * w);
  endfunction

endpackage
