// nco: numerically controlled oscillator for frequency adjustment.
//
// A PHASE_W-bit phase accumulator advances by the signed word 'freq' on every
// 'en'; its top LUT_BITS bits address a cosine/sine table of amplitude 511
// computed at elaboration from the sine function. The frequency step is
// f_sample * freq / 2^PHASE_W. Accumulator and table sizes are this design's
// choice; the document names the block only.
// Timing: cos_o/sin_o follow the phase register combinationally.
module nco #(
  parameter int PHASE_W  = 24,
  parameter int LUT_BITS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic signed [PHASE_W-1:0] freq,
  output logic signed [9:0]         cos_o,
  output logic signed [9:0]         sin_o
);
  localparam int N = 1 << LUT_BITS;
  typedef logic signed [9:0] lut_t [N];

  function automatic lut_t mk_lut(input bit is_sin);
    lut_t t;
    for (int i = 0; i < N; i++) begin
      real a;
      a = 2.0 * 3.14159265358979323846 * real'(i) / real'(N);
      t[i] = 10'(int'($floor(511.0 * (is_sin ? $sin(a) : $cos(a)) + 0.5)));
    end
    return t;
  endfunction

  localparam lut_t COS_LUT = mk_lut(1'b0);
  localparam lut_t SIN_LUT = mk_lut(1'b1);

  logic [PHASE_W-1:0] phase;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  phase <= '0;
    else if (en) phase <= phase + PHASE_W'(freq);

  assign cos_o = COS_LUT[phase[PHASE_W-1 -: LUT_BITS]];
  assign sin_o = SIN_LUT[phase[PHASE_W-1 -: LUT_BITS]];
endmodule
