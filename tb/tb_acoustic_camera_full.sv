// tb_acoustic_camera_full: one complete 160 x 120 frame with every parameter
// of the front end at its default. A 4 kHz plane wave arrives from the
// direction of pixel (120, 40). After the delay memories have filled, the
// testbench reads two frames (the first starts while the source history is
// still short of a full window) and checks the second: 19200 values with the
// end-of-frame flag on the last, the loudest pixel close to the source
// (within 12 pixels, about 4 degrees, the beam being broad at 4 kHz for an
// 81 mm array), and the frame time of 19200 x 80 clocks = 30.72 ms at 50 MHz.
module tb_acoustic_camera_full;
  import ac_pkg::*;
  localparam int W = 160, H = 120, NO = W * H;
  localparam int SRC_I = 120, SRC_J = 40;
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

  acoustic_camera_top dut (
    .clk, .rst_n, .cfg_run, .cfg_subarray_en, .pdm_clk_o(pdm_clk), .pdm_data_i(pdm_data),
    .fifo_rd_en, .fifo_dout, .fifo_last, .fifo_empty, .frame_start, .stat_stall, .stat_refill);

  pdm_mic_array_model #(.TONE_HZ(4000.0), .AMP(0.4), .SRC_X(SX), .SRC_Y(SY)) u_mics (
    .clk, .pdm_clk, .pdm_data);

  logic rd_q = 0;
  longint frame [NO];
  int pos = 0, nframes = 0, cyc = 0, t_start = 0, t_frame = 0;

  always @(negedge clk) begin
    cyc++;
    if (frame_start) begin
      if (nframes == 1) t_start = cyc;
    end
    if (rd_q) begin
      if (pos < NO) frame[pos] = longint'(fifo_dout);
      pos++;
      if (fifo_last) begin
        if (nframes == 1) begin
          t_frame = cyc - t_start;
          checks++;
          if (pos != NO) begin failures++; $display("frame of %0d values", pos); end
        end
        nframes++;
        pos = 0;
      end
    end
    fifo_rd_en = !fifo_empty;
    rd_q = fifo_rd_en;
  end

  initial begin
    int amax, amin, di, dj;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    cfg_run <= 1;
    wait (nframes == 2);
    amax = 0; amin = 0;
    for (int o = 0; o < NO; o++) begin
      if (frame[o] > frame[amax]) amax = o;
      if (frame[o] < frame[amin]) amin = o;
    end
    di = amax % W - SRC_I; dj = amax / W - SRC_J;
    $display("peak %0d at (%0d,%0d), minimum %0d, frame time %0d clocks", frame[amax], amax % W, amax / W, frame[amin], t_frame);
    checks += 3;
    if (di * di + dj * dj > 144) begin failures++; $display("peak too far from the source"); end
    if (real'(frame[amax]) < 2.0 * real'(frame[amin])) begin failures++; $display("no contrast"); end
    // reads lag the slot by a few clocks; the frame spans 19200 slots of 80 clocks
    if (t_frame < NO * 80 - 100 || t_frame > NO * 80 + 100) begin failures++; $display("frame time %0d", t_frame); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
