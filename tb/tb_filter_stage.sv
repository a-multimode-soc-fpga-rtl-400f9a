// tb_filter_stage: drives the 12 filter chains with 12 independent
// sigma-delta coded 4 kHz tones of amplitudes 0.05*(m+1) at the real PDM
// rate (one strobe per 16 clocks) and checks that all chains deliver their
// samples in the same clock, at one sample per 24 strobes, and that the
// RMS of microphone m's output is 0.05*(m+1)*24^4/sqrt(2) within 10 %
// (unit CIC gain 24^4, near-unit FIR gain at 4 kHz), which shows each chain
// is wired to its own input.
module tb_filter_stage;
  import ac_pkg::*;
  localparam int STROBE = 16;
  localparam int NOUT = 700;

  logic clk = 0, rst_n = 0;
  logic pdm_valid = 0;
  logic [NUM_MICS-1:0] pdm_bits = '0;
  logic out_valid;
  sample_t out_data [NUM_MICS];
  int checks = 0, failures = 0;

  filter_stage dut (.clk, .rst_n, .pdm_valid, .pdm_bits, .out_valid, .out_data);
  always #5 clk = ~clk;

  real  sq [NUM_MICS];
  int   n_out = 0, strobes = 0, last_strobes = 0;

  always @(negedge clk) begin
    if (out_valid) begin
      if (n_out >= 300) for (int m = 0; m < NUM_MICS; m++) sq[m] += real'(out_data[m]) * real'(out_data[m]);
      if (n_out > 0) begin
        checks++;
        if (strobes - last_strobes != CIC_R) failures++;
      end
      last_strobes = strobes;
      n_out++;
    end
    checks++;
    if (dut.valid != '0 && dut.valid != '1) failures++;
    if (pdm_valid) strobes++;
  end

  initial begin
    real i1 [NUM_MICS], i2 [NUM_MICS], v, y;
    longint i;
    for (int m = 0; m < NUM_MICS; m++) begin i1[m] = 0; i2[m] = 0; sq[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    i = 0;
    while (n_out < NOUT) begin
      logic [NUM_MICS-1:0] b;
      for (int m = 0; m < NUM_MICS; m++) begin
        v = 0.05 * (m + 1) * $sin(2.0 * 3.14159265 * 4000.0 * i / 3.125e6 + m);
        y = pdm_bits[m] ? 1.0 : -1.0;
        i1[m] = i1[m] + v - y;
        i2[m] = i2[m] + i1[m] - y;
        b[m] = (i2[m] >= 0.0);
      end
      repeat (STROBE - 1) @(posedge clk);
      pdm_valid <= 1; pdm_bits <= b;
      @(posedge clk);
      pdm_valid <= 0;
      i++;
    end
    for (int m = 0; m < NUM_MICS; m++) begin
      real rms, e;
      rms = $sqrt(sq[m] / (NOUT - 300));
      e = 0.05 * (m + 1) * 331776.0 / $sqrt(2.0);
      checks++;
      if (rms < 0.9 * e || rms > 1.1 * e) begin failures++; $display("mic %0d rms %f exp %f", m, rms, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOUT * CIC_R * STROBE + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
