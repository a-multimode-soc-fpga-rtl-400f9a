// tb_acoustic_camera_top: end-to-end run of the front end at an 8 x 6
// orientation grid with a 16-word output FIFO. A model of the 12-microphone
// array plays a 4 kHz plane wave from the direction of pixel (5, 1). The
// host side reads the FIFO and rebuilds frames from the end-of-frame flag.
// Checks: every frame has 48 values and ends with the flag; the loudest
// pixel is within one pixel of the source and clearly above the quietest;
// results leave at one per 80 clocks; while the host stops reading, the full
// FIFO stalls the beamformer and no value is lost; switching to the inner
// sub-array only restarts the fill and lowers the power by about (4/12)^2.
// The mechanisms are counted: fill wait, stall, refill after a mode switch,
// frame wrap; each must occur.
module tb_acoustic_camera_top;
  import ac_pkg::*;
  localparam int W = 8, H = 6, NO = W * H;
  localparam int SRC_I = 5, SRC_J = 1;
  localparam real T = 0.476976;      // tan(25.5 deg)
  localparam real SX = T * (2.0 * SRC_I + 1.0 - W) / W;
  localparam real SY = T * (2.0 * SRC_J + 1.0 - H) / W;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz
  int checks = 0, failures = 0;

  logic cfg_run = 0;
  logic [1:0] cfg_subarray_en = 2'b11;
  logic [5:0] pdm_clk, pdm_data;
  logic fifo_rd_en = 0, fifo_last, fifo_empty, frame_start, stat_stall, stat_refill;
  logic [31:0] fifo_dout;
  logic host_enable = 1;

  acoustic_camera_top #(.W_PIX(W), .H_PIX(H), .FIFO_DEPTH(16)) dut (
    .clk, .rst_n, .cfg_run, .cfg_subarray_en, .pdm_clk_o(pdm_clk), .pdm_data_i(pdm_data),
    .fifo_rd_en, .fifo_dout, .fifo_last, .fifo_empty, .frame_start, .stat_stall, .stat_refill);

  pdm_mic_array_model #(.TONE_HZ(4000.0), .AMP(0.4), .SRC_X(SX), .SRC_Y(SY)) u_mics (
    .clk, .pdm_clk, .pdm_data);

  // host: read whenever data is there
  logic rd_q = 0;
  longint frame [NO];
  int  pos = 0, nframes = 0, bad_frames = 0;
  real peak_full = 0, peak_sub1 = 0;
  int  n_fill_wait = 0, n_stall = 0, n_refill = 0, n_wrap = 0, n_srp = 0, n_spacing_ok = 0, n_spacing = 0;
  int  last_srp = -1, cyc = 0;
  logic phase_sub1 = 0;

  always @(negedge clk) begin
    cyc++;
    if (rd_q) begin
      if (pos < NO) frame[pos] = longint'(fifo_dout);
      pos++;
      if (fifo_last) begin
        if (pos != NO) bad_frames++;
        else analyse();
        nframes++;
        pos = 0;
      end
    end
    fifo_rd_en = host_enable && !fifo_empty;
    rd_q = fifo_rd_en;
    if (rst_n && cfg_run && !dut.u_ctrl.filled) n_fill_wait++;
    if (stat_stall) n_stall++;
    if (stat_refill) n_refill++;
    if (frame_start) n_wrap++;
    if (dut.srp_valid) begin
      if (last_srp >= 0 && !dut.fifo_full && cyc - last_srp < 200) begin
        n_spacing++;
        if (cyc - last_srp == 80) n_spacing_ok++;
      end
      last_srp = cyc;
      n_srp++;
    end
  end

  task automatic analyse();
    int amax = 0, amin = 0;
    for (int o = 0; o < NO; o++) begin
      if (frame[o] > frame[amax]) amax = o;
      if (frame[o] < frame[amin]) amin = o;
    end
    $display("frame %0d: max %0d at (%0d,%0d) min %0d sub1=%0d", nframes, frame[amax], amax % W, amax / W, frame[amin], phase_sub1);
    if (nframes < 2) return;   // first frames may mix in samples from before the source settled
    if (!phase_sub1) begin
      checks += 2;
      if ((amax % W - SRC_I) > 1 || (SRC_I - amax % W) > 1 || (amax / W - SRC_J) > 1 || (SRC_J - amax / W) > 1) begin
        failures++; $display("peak at (%0d,%0d), source at (%0d,%0d)", amax % W, amax / W, SRC_I, SRC_J);
      end
      if (real'(frame[amax]) < 1.3 * real'(frame[amin])) begin failures++; $display("no contrast"); end
      if (real'(frame[amax]) > peak_full) peak_full = real'(frame[amax]);
    end else begin
      if (real'(frame[amax]) > peak_sub1) peak_sub1 = real'(frame[amax]);
    end
  endtask

  initial begin
    int f0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    cfg_run <= 1;
    wait (nframes == 4);
    // host stops reading: FIFO fills and stalls the beamformer
    host_enable = 0;
    repeat (NO * 80 * 2) @(posedge clk);
    host_enable = 1;
    f0 = nframes;
    wait (nframes == f0 + 3);
    // mode switch: inner sub-array only
    cfg_subarray_en <= 2'b01;
    wait (n_refill >= 2);
    phase_sub1 = 1;
    f0 = nframes;
    wait (nframes == f0 + 4);
    checks += 7;
    if (bad_frames != 0) begin failures++; $display("%0d incomplete frames", bad_frames); end
    if (n_fill_wait == 0) begin failures++; $display("fill wait never seen"); end
    if (n_stall == 0) begin failures++; $display("stall never seen"); end
    if (n_refill < 2) begin failures++; $display("refill after mode switch never seen"); end
    if (n_wrap < 10) begin failures++; $display("frame wrap count %0d", n_wrap); end
    if (n_spacing == 0 || n_spacing_ok != n_spacing) begin failures++; $display("spacing %0d of %0d", n_spacing_ok, n_spacing); end
    // only 4 of 12 microphones: peak power near (4/12)^2 of the full array
    if (peak_sub1 > 0.3 * peak_full || peak_sub1 < 0.03 * peak_full) begin
      failures++; $display("sub-array power ratio %f", peak_sub1 / peak_full);
    end
    $display("fill-wait cycles %0d, stall cycles %0d, refills %0d, frames %0d, SRP values %0d, 80-clock spacings %0d",
             n_fill_wait, n_stall, n_refill, n_wrap, n_srp, n_spacing_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
