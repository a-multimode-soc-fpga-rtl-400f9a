// tb_cic_decimator: compares the CIC decimator with an independent model.
// A 4th-order CIC with decimation R equals an FIR filter whose impulse
// response is four boxcars of length R convolved, sampled every R inputs.
// The testbench builds that impulse response, filters the same random PDM
// stream (bits mapped to +/-1) and compares every output, including the
// first ones that see the all-zero start. It also checks that exactly one
// output appears per R inputs, one clock after the R-th input, and the
// full-scale value R^4 for a constant 1 input.
module tb_cic_decimator;
  import ac_pkg::*;
  localparam int N = 4, R = 24;
  localparam int HL = N * (R - 1) + 1;
  localparam int NIN = 24 * 200;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0;
  logic out_valid;
  sample_t out_data;
  int checks = 0, failures = 0;

  cic_decimator #(.N(N), .R(R)) dut (.clk, .rst_n, .in_valid, .in_bit, .out_valid, .out_data);
  always #5 clk = ~clk;

  longint h [HL];
  int     x [NIN];
  int     n_in = 0, n_out = 0;
  int     last_in_cyc = 0, cyc = 0;

  function automatic longint ref_out(input int n);
    longint s = 0;
    for (int i = 0; i < HL; i++) if (n - i >= 0) s += h[i] * x[n - i];
    return s;
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (out_valid) begin
      longint e;
      e = ref_out(n_out * R + R - 1 - N);
      checks++;
      if (longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d exp %0d", n_out, out_data, e);
      end
      checks++;
      if (n_in != (n_out + 1) * R || cyc - last_in_cyc != 1) begin
        failures++;
        $display("timing: out %0d after %0d inputs", n_out, n_in);
      end
      n_out++;
    end
    if (in_valid) begin last_in_cyc = cyc; n_in++; end
  end

  initial begin
    longint tmp [HL];
    for (int i = 0; i < HL; i++) h[i] = (i < R) ? 1 : 0;
    for (int k = 1; k < N; k++) begin
      for (int i = 0; i < HL; i++) begin
        tmp[i] = 0;
        for (int j = 0; j < R; j++) if (i - j >= 0) tmp[i] += h[i - j];
      end
      h = tmp;
    end
    for (int i = 0; i < NIN; i++) begin
      // slowly varying density, like a sigma-delta stream of a tone
      int p = 50 + int'(40.0 * $sin(2.0 * 3.14159 * i / 700.0));
      x[i] = (($urandom % 100) < p) ? 1 : -1;
      if (i >= NIN - 24 * 10) x[i] = 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(posedge clk);
      in_valid <= 1; in_bit <= (x[i] == 1);
      @(posedge clk);
      in_valid <= 0;
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (out_data != R * R * R * R) begin failures++; $display("full scale %0d", out_data); end
    checks++;
    if (n_out != NIN / R) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
