// tb_fir_filter: drives the serial FIR the way the chain does (one input per
// 24 MAC strobes, a strobe every 4 clocks here) with random samples and
// compares each output with the direct convolution of the coefficient table,
// rounded and shifted back to Q16.16. Also checks the output timing (two
// clocks after the 24th strobe following an input), saturation on large
// inputs and the DC gain with a constant input.
module tb_fir_filter;
  import ac_pkg::*;
  localparam int NIN = 300;
  localparam int STROBE = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, mac_en = 0;
  sample_t in_data = '0;
  logic out_valid;
  sample_t out_data;
  int checks = 0, failures = 0;

  fir_filter dut (.clk, .rst_n, .in_valid, .in_data, .mac_en, .out_valid, .out_data);
  always #5 clk = ~clk;

  longint x [NIN];
  int n_out = 0, strobes_since_in = 0, last_strobe_cyc = 0, cyc = 0;

  function automatic longint expected(input int n);
    longint s = 0, y;
    for (int k = 0; k < FIR_TAPS; k++) if (n - k >= 0) s += longint'(FIR_COEFS[k]) * x[n - k];
    y = (s + 16384) >>> 15;
    if (y > 64'sd2147483647) y = 64'sd2147483647;
    if (y < -64'sd2147483648) y = -64'sd2147483648;
    return y;
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (out_valid) begin
      longint e;
      e = expected(n_out);
      checks++;
      if (longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d exp %0d", n_out, out_data, e);
      end
      checks++;
      if (strobes_since_in != FIR_TAPS || cyc - last_strobe_cyc != 2) begin
        failures++; $display("timing: %0d strobes, %0d clocks", strobes_since_in, cyc - last_strobe_cyc);
      end
      n_out++;
    end
    if (in_valid) strobes_since_in = 0;
    else if (mac_en) begin strobes_since_in++; last_strobe_cyc = cyc; end
  end

  initial begin
    for (int i = 0; i < NIN; i++) begin
      if (i < 100)      x[i] = longint'($signed($urandom)) >>> 2;
      else if (i < 150) x[i] = (i % 2) ? 64'sd2147483647 : 64'sd2147483600;   // saturates
      else if (i < 250) x[i] = longint'($signed($urandom % 2000001)) - 1000000;
      else              x[i] = 65536;                                          // DC 1.0
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(posedge clk);
      in_valid <= 1; in_data <= sample_t'(x[i]);
      @(posedge clk);
      in_valid <= 0;
      for (int s = 0; s < FIR_TAPS; s++) begin
        repeat (STROBE - 1) @(posedge clk);
        mac_en <= 1;
        @(posedge clk);
        mac_en <= 0;
      end
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != NIN) failures++;
    checks++;
    if (out_data < 65536 - 64 || out_data > 65536 + 64) begin failures++; $display("DC gain %0d", out_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
