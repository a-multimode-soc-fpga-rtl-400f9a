// tb_moving_average_filter: feeds random signed samples with a DC offset
// and compares every output with x[n] - floor(sum of the last 2^LOG2_LEN
// inputs / 2^LOG2_LEN), inputs before the first counting as zero. Checks
// the two-clock latency and that the DC offset is gone once the window is
// full.
module tb_moving_average_filter;
  import ac_pkg::*;
  localparam int LOG2_LEN = 7;
  localparam int LEN = 1 << LOG2_LEN;
  localparam int NIN = 700;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  sample_t in_data = '0;
  logic out_valid;
  sample_t out_data;
  int checks = 0, failures = 0;

  moving_average_filter #(.LOG2_LEN(LOG2_LEN)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);
  always #5 clk = ~clk;

  longint x [NIN];
  int n_out = 0, cyc = 0, in_cyc = 0;
  longint tail_sum = 0;

  function automatic longint floordiv(input longint a, input longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (out_valid) begin
      longint s, e;
      s = 0;
      for (int i = 0; i < LEN; i++) if (n_out - i >= 0) s += x[n_out - i];
      e = x[n_out] - floordiv(s, LEN);
      checks++;
      if (longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d exp %0d", n_out, out_data, e);
      end
      checks++;
      if (cyc - in_cyc != 2) begin failures++; $display("latency %0d", cyc - in_cyc); end
      if (n_out >= NIN - 256) tail_sum += longint'(out_data);
      n_out++;
    end
    if (in_valid) in_cyc = cyc;
  end

  initial begin
    for (int i = 0; i < NIN; i++) x[i] = 300000 + longint'($signed($urandom % 200001)) - 100000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NIN; i++) begin
      @(posedge clk);
      in_valid <= 1; in_data <= sample_t'(x[i]);
      @(posedge clk);
      in_valid <= 0;
      repeat (1 + $urandom % 3) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != NIN) failures++;
    // mean of the last 256 outputs must be far below the 300000 offset
    checks++;
    if (tail_sum / 256 > 30000 || tail_sum / 256 < -30000) begin failures++; $display("residual DC %0d", tail_sum / 256); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
