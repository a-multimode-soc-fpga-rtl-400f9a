// acoustic_camera_top: programmable-logic front end of a 12-microphone
// acoustic camera.
//
// The camera turns the PDM streams of a 12-microphone MEMS array into one
// steered-response-power (SRP) value per orientation of a W_PIX x H_PIX
// grid; the host assembles these values into an acoustic heat map. Data
// flow, all in one clock domain (50 MHz by default):
//   pdm_interface  -> 3.125 MHz PDM clock, 12 one-bit streams
//   filter_stage   -> per microphone CIC(4, /24) -> DC removal -> 24-tap FIR,
//                     Q16.16 samples at 130.208 kHz
//   delay_decimation_stage -> one circular buffer per microphone, read back
//                     with per-orientation delays at a stride of 4
//   delay_rom      -> the delays of all 12 microphones for each orientation
//   detection_stage-> sub-array sums, beam sum, sum of squares over 64
//   control_unit   -> write pointer, fill wait, 80-clock orientation slots,
//                     frame sequencing, sub-array configuration, stall
//   sync_fifo      -> SRP values with an end-of-frame flag for the host link
// The partition into filter, delay-and-decimation and detection stages and
// the control unit, and all the rates, follow the source. At 80 clocks per
// orientation and 50 MHz a 160 x 120 frame takes 30.72 ms.
//
// Interface: cfg_run enables beamforming; cfg_subarray_en[0] enables the
// inner 4-microphone ring, [1] the outer 8-microphone ring (taken at frame
// start). The host reads the FIFO with fifo_rd_en while fifo_empty is low;
// fifo_dout/fifo_last are valid the clock after. Status pulses: frame_start,
// stat_stall (beamformer waiting on a full FIFO), stat_refill (memories
// refilling after a configuration change).
module acoustic_camera_top
  import ac_pkg::*;
#(
  parameter int W_PIX         = 160,
  parameter int H_PIX         = 120,
  parameter int ORIENT_CYCLES = 80,
  parameter int PDM_CLK_DIV   = 16,
  parameter int MEM_DEPTH     = 512,
  parameter int FIFO_DEPTH    = 512,
  parameter int OUT_SHIFT     = 24,
  parameter int MA_LOG2_LEN   = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_run,
  input  logic [NUM_SUBARRAYS-1:0] cfg_subarray_en,
  output logic [NUM_LINES-1:0]     pdm_clk_o,
  input  logic [NUM_LINES-1:0]     pdm_data_i,
  input  logic                     fifo_rd_en,
  output logic [31:0]              fifo_dout,
  output logic                     fifo_last,
  output logic                     fifo_empty,
  output logic                     frame_start,
  output logic                     stat_stall,
  output logic                     stat_refill
);
  localparam int N_O     = W_PIX * H_PIX;
  localparam int DELAY_W = 5;
  localparam int AW      = $clog2(MEM_DEPTH);
  localparam int OW      = (N_O > 1) ? $clog2(N_O) : 1;
  localparam int KW      = $clog2(SRP_SAMPLES);

  logic [NUM_MICS-1:0]         mic_bits;
  logic                        bits_valid;
  logic                        filt_valid;
  sample_t                     filt_data [NUM_MICS];
  logic [AW-1:0]               wptr, rd_base;
  logic [NUM_SUBARRAYS-1:0]    subarray_en;
  logic [OW-1:0]               orient;
  logic                        orient_last;
  logic                        rd_en, rd_first, rd_last;
  logic [KW-1:0]               rd_k;
  logic [NUM_MICS*DELAY_W-1:0] delays;
  logic                        al_valid, al_first, al_last;
  sample_t                     al_data [NUM_MICS];
  logic                        srp_valid;
  logic [31:0]                 srp_power;
  logic                        fifo_full;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  pdm_interface #(.CLK_DIV(PDM_CLK_DIV), .NUM_LINES(NUM_LINES)) u_pdm (
    .clk, .rst_n,
    .pdm_clk_o, .pdm_data_i,
    .mic_bits_o(mic_bits), .bits_valid_o(bits_valid));

  filter_stage #(.NUM_MICS(NUM_MICS), .MA_LOG2_LEN(MA_LOG2_LEN)) u_filters (
    .clk, .rst_n,
    .pdm_valid(bits_valid), .pdm_bits(mic_bits),
    .out_valid(filt_valid), .out_data(filt_data));

  control_unit #(.N_O(N_O), .ORIENT_CYCLES(ORIENT_CYCLES), .DEPTH(MEM_DEPTH),
                 .DELAY_W(DELAY_W)) u_ctrl (
    .clk, .rst_n,
    .cfg_run, .cfg_subarray_en,
    .wr_valid(filt_valid), .fifo_full,
    .wptr, .subarray_en, .orient, .orient_last,
    .rd_en, .rd_k, .rd_base, .rd_first, .rd_last,
    .frame_start, .stat_stall, .stat_refill);

  delay_rom #(.W_PIX(W_PIX), .H_PIX(H_PIX), .DELAY_W(DELAY_W)) u_rom (
    .clk, .addr(orient), .delays);

  delay_decimation_stage #(.DEPTH(MEM_DEPTH), .DELAY_W(DELAY_W)) u_delay (
    .clk, .rst_n, .subarray_en,
    .wr_valid(filt_valid), .wr_data(filt_data), .wptr,
    .rd_en, .rd_k, .rd_base, .rd_first, .rd_last, .delays,
    .rd_valid_o(al_valid), .rd_first_o(al_first), .rd_last_o(al_last),
    .rd_data(al_data));

  detection_stage #(.OUT_SHIFT(OUT_SHIFT)) u_detect (
    .clk, .rst_n,
    .in_valid(al_valid), .in_first(al_first), .in_last(al_last),
    .in_data(al_data),
    .out_valid(srp_valid), .out_power(srp_power));

  sync_fifo #(.W(33), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(srp_valid), .din({orient_last, srp_power}), .full(fifo_full),
    .rd_en(fifo_rd_en), .dout({fifo_last, fifo_dout}), .empty(fifo_empty),
    .count(fifo_count));
endmodule
