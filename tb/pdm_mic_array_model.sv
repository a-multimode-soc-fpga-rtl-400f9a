// pdm_mic_array_model: behavioural model of the 12-microphone MEMS array
// (not synthesizable). Each microphone is a second-order sigma-delta
// modulator sampled on the PDM clock, producing the 1-bit PDM stream of a
// plane-wave tone of TONE_HZ arriving from the direction (SRC_X, SRC_Y, 1)
// plus a DC offset. The arrival time at microphone m is advanced by
// (u . p_m) / c, with p_m the array geometry of ac_pkg. Microphone pairs
// share a data line: the even microphone drives it while the PDM clock is
// high, the odd one while it is low. The model works on the system clock's
// falling edges and counts PDM periods for its time base (FS_HZ per period).
module pdm_mic_array_model #(
  parameter real TONE_HZ = 4000.0,
  parameter real AMP     = 0.4,
  parameter real DC      = 0.05,
  parameter real SRC_X   = 0.0,
  parameter real SRC_Y   = 0.0,
  parameter real FS_HZ   = 3.125e6
) (
  input  logic       clk,
  input  logic [5:0] pdm_clk,
  output logic [5:0] pdm_data
);
  import ac_pkg::*;

  real  i1 [NUM_MICS];
  real  i2 [NUM_MICS];
  real  adv [NUM_MICS];
  logic [NUM_MICS-1:0] bits;
  logic prev = 1'b0;
  longint n = 0;

  initial begin
    real nrm;
    nrm = $sqrt(SRC_X * SRC_X + SRC_Y * SRC_Y + 1.0);
    for (int m = 0; m < NUM_MICS; m++) begin
      i1[m] = 0.0; i2[m] = 0.0;
      adv[m] = (SRC_X * MIC_X_UM[m] + SRC_Y * MIC_Y_UM[m]) * 1.0e-6 / nrm / SOUND_MPS;
    end
    bits = '0;
    pdm_data = '0;
  end

  always @(negedge clk) begin
    if (pdm_clk[0] && !prev) begin
      for (int m = 0; m < NUM_MICS; m++) begin
        real x, y;
        x = DC + AMP * $sin(2.0 * 3.14159265358979 * TONE_HZ * (real'(n) / FS_HZ + adv[m]));
        y = bits[m] ? 1.0 : -1.0;
        i1[m] = i1[m] + x - y;
        i2[m] = i2[m] + i1[m] - y;
        bits[m] = (i2[m] >= 0.0);
      end
      n++;
    end
    prev = pdm_clk[0];
    for (int l = 0; l < 6; l++) pdm_data[l] = pdm_clk[0] ? bits[2*l] : bits[2*l+1];
  end
endmodule
