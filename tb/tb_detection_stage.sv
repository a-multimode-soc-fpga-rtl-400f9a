// tb_detection_stage: streams orientations of 64 random aligned sample
// sets and compares each SRP with sum_k (sum_m x[k][m])^2 >> 24, saturated to
// 32 bits, computed here with 128-bit arithmetic. Includes large inputs that
// saturate, back-to-back orientations, a gap inside an orientation, and
// checks the 4-clock latency after the last sample.
module tb_detection_stage;
  import ac_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_first = 0, in_last = 0;
  sample_t in_data [NUM_MICS];
  logic out_valid;
  logic [31:0] out_power;

  detection_stage dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_data, .out_valid, .out_power);

  logic [127:0] expq [$];
  int lastcyc [$];
  int cyc = 0, nout = 0;

  always @(negedge clk) begin
    cyc++;
    if (out_valid) begin
      logic [127:0] e;
      int lc;
      e = expq.pop_front();
      lc = lastcyc.pop_front();
      checks += 2;
      if (out_power != e[31:0]) begin failures++; if (failures < 10) $display("got %0d exp %0d", out_power, e[31:0]); end
      if (cyc - lc != 4) begin failures++; $display("latency %0d", cyc - lc); end
      nout++;
    end
  end

  initial begin
    for (int m = 0; m < NUM_MICS; m++) in_data[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < 40; o++) begin
      logic signed [127:0] acc, b;
      int scale;
      acc = 0;
      scale = (o % 5 == 4) ? 31 : (o % 3) * 8 + 12;   // amplitude in bits
      for (int k = 0; k < SRP_SAMPLES; k++) begin
        @(negedge clk);
        if (o == 7 && k == 30) begin in_valid = 0; @(negedge clk); end
        b = 0;
        for (int m = 0; m < NUM_MICS; m++) begin
          in_data[m] = sample_t'($signed($urandom) >>> (32 - scale));
          b += 128'(signed'(in_data[m]));
        end
        acc += b * b;
        in_valid = 1; in_first = (k == 0); in_last = (k == SRP_SAMPLES - 1);
        if (in_last) lastcyc.push_back(cyc + 1);
      end
      acc = acc >>> 24;
      expq.push_back((acc > 128'h0FFFF_FFFF) ? 128'hFFFF_FFFF : acc);
      if (o % 4 == 1) begin @(negedge clk); in_valid = 0; repeat (3) @(negedge clk); end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != 40) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
