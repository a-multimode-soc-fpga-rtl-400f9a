// resolution_run: testbench helper that builds the front end at one
// W x H orientation grid, plays a 4 kHz plane wave from the direction of
// pixel (3W/4, H/3), reads the first complete frame and reports its length,
// its duration in clocks and the position of the loudest pixel.
module resolution_run #(
  parameter int W = 40,
  parameter int H = 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   n_values,
  output int   frame_clocks,
  output int   peak_i,
  output int   peak_j,
  output int   src_i,
  output int   src_j,
  output real  contrast
);
  localparam int NO = W * H;
  localparam int SI = (3 * W) / 4, SJ = H / 3;
  localparam real T = 0.476976;      // tan(25.5 deg)
  localparam real SX = T * (2.0 * SI + 1.0 - W) / W;
  localparam real SY = T * (2.0 * SJ + 1.0 - H) / W;

  logic [5:0] pdm_clk, pdm_data;
  logic fifo_rd_en = 0, fifo_last, fifo_empty, frame_start, stat_stall, stat_refill;
  logic [31:0] fifo_dout;

  acoustic_camera_top #(.W_PIX(W), .H_PIX(H)) dut (
    .clk, .rst_n, .cfg_run(1'b1), .cfg_subarray_en(2'b11), .pdm_clk_o(pdm_clk), .pdm_data_i(pdm_data),
    .fifo_rd_en, .fifo_dout, .fifo_last, .fifo_empty, .frame_start, .stat_stall, .stat_refill);

  pdm_mic_array_model #(.TONE_HZ(4000.0), .AMP(0.4), .SRC_X(SX), .SRC_Y(SY)) u_mics (
    .clk, .pdm_clk, .pdm_data);

  logic rd_q = 0, started = 0;
  longint vmax = 0, vmin = 64'h7fff_ffff_ffff;
  int pos = 0, cyc = 0, t0 = 0;

  assign src_i = SI;
  assign src_j = SJ;

  initial begin
    done = 0; n_values = 0; frame_clocks = 0; peak_i = 0; peak_j = 0; contrast = 0.0;
  end

  always @(negedge clk) begin
    cyc++;
    if (frame_start && !started) begin started = 1; t0 = cyc; end
    if (rd_q && started && !done) begin
      if (longint'(fifo_dout) > vmax) begin vmax = longint'(fifo_dout); peak_i = pos % W; peak_j = pos / W; end
      if (longint'(fifo_dout) < vmin) vmin = longint'(fifo_dout);
      pos++;
      if (fifo_last) begin
        done = 1;
        n_values = pos;
        frame_clocks = cyc - t0;
        contrast = real'(vmax) / real'(vmin + 1);
      end
    end
    fifo_rd_en = !fifo_empty;
    rd_q = fifo_rd_en;
  end
endmodule
