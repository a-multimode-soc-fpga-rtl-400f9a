// tb_filter_chain: runs one complete microphone filter chain on a
// sigma-delta coded tone with a DC offset and compares the output sequence
// bit for bit with a reference built in the testbench from the textbook
// definitions: a CIC as four cascaded boxcars of length 24 sampled every 24
// inputs, the moving average as x - floor(window sum / 128), and the FIR as
// a rounded convolution with the coefficient table. Also checks one output
// per 24 PDM strobes and that the DC offset is removed.
module tb_filter_chain;
  import ac_pkg::*;
  localparam int R = CIC_R, N = CIC_N;
  localparam int HL = N * (R - 1) + 1;
  localparam int NOUT = 400;
  localparam int NIN = NOUT * R + 2 * R;
  localparam int STROBE = 4;

  logic clk = 0, rst_n = 0;
  logic pdm_valid = 0, pdm_bit = 0;
  logic out_valid;
  sample_t out_data;
  int checks = 0, failures = 0;

  filter_chain dut (.clk, .rst_n, .pdm_valid, .pdm_bit, .out_valid, .out_data);
  always #5 clk = ~clk;

  longint h [HL];
  int     x [NIN];
  longint got [NOUT];
  int     n_out = 0, strobes = 0, last_strobes = 0;

  always @(negedge clk) begin
    if (out_valid) begin
      if (n_out < NOUT) got[n_out] = longint'(out_data);
      if (n_out > 0) begin
        checks++;
        if (strobes - last_strobes != R) begin failures++; $display("rate: %0d strobes", strobes - last_strobes); end
      end
      last_strobes = strobes;
      n_out++;
    end
    if (pdm_valid) strobes++;
  end

  function automatic longint floordiv(input longint a, input longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  initial begin
    longint tmp [HL];
    longint c [NOUT], ma [NOUT];
    real i1 = 0, i2 = 0, v;
    longint mean_tail = 0;
    for (int i = 0; i < HL; i++) h[i] = (i < R) ? 1 : 0;
    for (int k = 1; k < N; k++) begin
      for (int i = 0; i < HL; i++) begin
        tmp[i] = 0;
        for (int j = 0; j < R; j++) if (i - j >= 0) tmp[i] += h[i - j];
      end
      h = tmp;
    end
    for (int i = 0; i < NIN; i++) begin
      v = 0.1 + 0.4 * $sin(2.0 * 3.14159265 * 4000.0 * i / 3.125e6);
      i1 = i1 + v - ((i > 0 && x[i-1] == 1) ? 1.0 : -1.0);
      i2 = i2 + i1 - ((i > 0 && x[i-1] == 1) ? 1.0 : -1.0);
      x[i] = (i2 >= 0.0) ? 1 : -1;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < NIN; i++) begin
      repeat (STROBE - 1) @(posedge clk);
      pdm_valid <= 1; pdm_bit <= (x[i] == 1);
      @(posedge clk);
      pdm_valid <= 0;
    end
    repeat (10) @(posedge clk);
    // reference chain
    for (int j = 0; j < NOUT; j++) begin
      c[j] = 0;
      for (int i = 0; i < HL; i++) if (j * R + R - 1 - N - i >= 0) c[j] += h[i] * x[j * R + R - 1 - N - i];
    end
    for (int j = 0; j < NOUT; j++) begin
      longint s;
      s = 0;
      for (int i = 0; i < 128; i++) if (j - i >= 0) s += c[j - i];
      ma[j] = c[j] - floordiv(s, 128);
    end
    checks++;
    if (n_out < NOUT) begin failures++; $display("only %0d outputs", n_out); end
    for (int j = 0; j < NOUT && j < n_out; j++) begin
      longint s, y;
      s = 0;
      for (int k = 0; k < FIR_TAPS; k++) if (j - k >= 0) s += longint'(FIR_COEFS[k]) * ma[j - k];
      y = (s + 16384) >>> 15;
      checks++;
      if (got[j] != y) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d exp %0d", j, got[j], y);
      end
      if (j >= NOUT - 128) mean_tail += got[j];
    end
    // offset 0.1 of full scale is about 33000 before DC removal
    checks++;
    if (mean_tail / 128 > 3000 || mean_tail / 128 < -3000) begin failures++; $display("residual DC %0d", mean_tail / 128); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NIN * STROBE + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
