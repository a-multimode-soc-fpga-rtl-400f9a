// ac_pkg: constants and types shared by the acoustic camera front end.
//
// The numbers follow the design's configuration table: 12 PDM microphones
// in two concentric sub-arrays, PDM sampling at 3.125 MHz, a 4th-order CIC
// decimating by 24, a 24-tap serial FIR, and a further decimation by 4 that
// is carried out while the delay memories are read. Samples travel through
// the filter chain as signed 32-bit fixed point with 16 fractional bits.
//
// Choices of this design, not of the source description: the FIR
// coefficients (Hamming-windowed sinc, cut-off F_max = 16.275 kHz at the FIR
// rate of 130.208 kHz, scaled to unity DC gain and rounded to Q1.15:
// h[n] = round(32768 * w[n] * sinc(2*fc*(n-11.5)) / sum)), the speed of
// sound (343 m/s) and the angular placement of the microphones. The radii
// (20.32 mm inner, 40.64 mm outer) come from the array drawing; the inner
// ring is turned 22.5 degrees against the outer ring, which reproduces the
// stated shortest (23.20 mm) and longest (81.28 mm) microphone distances.
package ac_pkg;

  localparam int NUM_MICS      = 12;
  localparam int NUM_LINES     = 6;     // paired microphones share a line
  localparam int SUB1_MICS     = 4;     // microphones 0..3 form sub-array 1
  localparam int NUM_SUBARRAYS = 2;

  localparam int DATA_W  = 32;          // signed Q16.16
  localparam int FRAC_W  = 16;
  localparam int COEF_W  = 16;          // FIR coefficients, Q1.15
  localparam int CIC_N   = 4;
  localparam int CIC_R   = 24;
  localparam int FIR_TAPS = 24;
  localparam int D_FIR   = 4;
  localparam int SRP_SAMPLES = 64;

  localparam real PDM_FS_HZ = 3.125e6;
  localparam real MEM_FS_HZ = PDM_FS_HZ / CIC_R;   // 130.208 kHz
  localparam real SOUND_MPS = 343.0;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t FIR_COEFS [FIR_TAPS] = '{
    16'sd28,   16'sd89,   16'sd149,  16'sd106,  -16'sd175, -16'sd660,
    -16'sd999, -16'sd614, 16'sd917,  16'sd3449, 16'sd6165, 16'sd7930,
    16'sd7930, 16'sd6165, 16'sd3449, 16'sd917,  -16'sd614, -16'sd999,
    -16'sd660, -16'sd175, 16'sd106,  16'sd149,  16'sd89,   16'sd28};

  // Microphone positions in micrometres, in the array plane (z = 0).
  localparam int MIC_X_UM [NUM_MICS] = '{
     18773,  -7776, -18773,   7776,
     40640,  28737,      0, -28737, -40640, -28737,      0,  28737};
  localparam int MIC_Y_UM [NUM_MICS] = '{
      7776,  18773,  -7776, -18773,
         0,  28737,  40640,  28737,      0, -28737, -40640, -28737};

  function automatic int subarray_of(input int mic);
    return (mic < SUB1_MICS) ? 0 : 1;
  endfunction

endpackage
