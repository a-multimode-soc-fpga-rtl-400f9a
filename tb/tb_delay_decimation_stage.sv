// tb_delay_decimation_stage: writes 400 samples per microphone whose values
// encode microphone and sample index, then performs orientation reads with
// random delays and checks every returned sample is the one at
// base - d_m - 4*k (wrapping in the 512-word buffer), one clock after the
// read. Then switches sub-array 2 off, writes more samples and reads again:
// its outputs must be zero while sub-array 1 keeps working, and after
// re-enabling it must still hold its old samples (no writes while off).
module tb_delay_decimation_stage;
  import ac_pkg::*;
  localparam int DEPTH = 512, AW = 9, KW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] subarray_en = 2'b11;
  logic wr_valid = 0;
  sample_t wr_data [NUM_MICS];
  logic [AW-1:0] wptr = '0, rd_base = '0;
  logic rd_en = 0, rd_first = 0, rd_last = 0;
  logic [KW-1:0] rd_k = '0;
  logic [59:0] delays = '0;
  logic rd_valid_o, rd_first_o, rd_last_o;
  sample_t rd_data [NUM_MICS];

  delay_decimation_stage dut (.clk, .rst_n, .subarray_en, .wr_valid, .wr_data, .wptr,
    .rd_en, .rd_k, .rd_base, .rd_first, .rd_last, .delays,
    .rd_valid_o, .rd_first_o, .rd_last_o, .rd_data);

  int nw = 0;   // samples written so far; sample i of mic m has value m*65536+i
  int last_w2 = 0;  // last sample index written to sub-array 2

  task automatic write_samples(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_valid = 1; wptr = AW'(nw);
      for (int m = 0; m < NUM_MICS; m++) wr_data[m] = sample_t'(m * 65536 + nw);
      if (subarray_en[1]) last_w2 = nw;
      nw++;
      @(negedge clk);
      wr_valid = 0;
    end
  endtask

  task automatic orientation(input bit expect_sub2);
    int d [NUM_MICS];
    int base;
    base = nw - 1;
    for (int m = 0; m < NUM_MICS; m++) begin
      d[m] = $urandom % 17;
      delays[m*5 +: 5] = 5'(d[m]);
    end
    rd_base = AW'(base);
    for (int k = 0; k < SRP_SAMPLES; k++) begin
      @(negedge clk);
      rd_en = 1; rd_k = KW'(k); rd_first = (k == 0); rd_last = (k == SRP_SAMPLES - 1);
      @(negedge clk);
      rd_en = 0;
      checks += 3;
      if (!rd_valid_o) failures++;
      if (rd_first_o != (k == 0)) failures++;
      if (rd_last_o != (k == SRP_SAMPLES - 1)) failures++;
      for (int m = 0; m < NUM_MICS; m++) begin
        int idx, e;
        idx = base - d[m] - D_FIR * k;
        e = m * 65536 + idx;
        if (m >= SUB1_MICS && !expect_sub2) e = 0;
        checks++;
        if (int'(rd_data[m]) != e) begin
          failures++;
          if (failures < 10) $display("k=%0d m=%0d got %0d exp %0d", k, m, rd_data[m], e);
        end
      end
    end
  endtask

  initial begin
    for (int m = 0; m < NUM_MICS; m++) wr_data[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    write_samples(400);
    repeat (5) orientation(1);
    // 200 more samples: reads wrap around the buffer
    write_samples(200);
    repeat (5) orientation(1);
    subarray_en = 2'b01;
    write_samples(20);
    repeat (3) orientation(0);
    // re-enable: sub-array 2 must not have been written while off
    subarray_en = 2'b11;
    @(negedge clk);
    rd_base = AW'(last_w2); delays = '0; rd_k = '0;
    rd_en = 1; @(negedge clk); rd_en = 0;
    for (int m = SUB1_MICS; m < NUM_MICS; m++) begin
      checks++;
      if (int'(rd_data[m]) != m * 65536 + last_w2) failures++;
    end
    rd_base = AW'(nw - 1);
    rd_en = 1; @(negedge clk); rd_en = 0;
    for (int m = SUB1_MICS; m < NUM_MICS; m++) begin
      checks++;
      if (int'(rd_data[m]) == m * 65536 + nw - 1) failures++;   // stale, not the new sample
    end
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
