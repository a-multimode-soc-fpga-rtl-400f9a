// delay_decimation_stage: the delay memories of all microphones, grouped in
// sub-arrays, and the decimating read that aligns them for one orientation.
//
// Every filtered sample (130.208 kHz) of every microphone is written to its
// own delay_memory at the shared write pointer wptr. To beamform one
// orientation the control unit issues SRP_SAMPLES reads k = 0..63; for
// microphone m the address is
//     raddr_m = rd_base - d_m - D_FIR * k
// with rd_base the newest sample when the orientation started and d_m the
// microphone's delay for this orientation. The stride of D_FIR = 4 makes the
// read itself the last decimation stage (130.208 kHz -> 32.55 kHz) while
// the delays keep the 130.208 kHz resolution; this is the source's
// "decimate while beamforming". Microphones 0..3 form sub-array 1 and
// 4..11 sub-array 2; the memories of a sub-array whose enable is low neither
// write nor read and contribute zero to the output.
//
// Timing: rd_data, rd_valid_o and the first/last tags follow rd_en by one
// clock.
module delay_decimation_stage
  import ac_pkg::*;
#(
  parameter int DEPTH   = 512,
  parameter int DELAY_W = 5,
  localparam int AW     = $clog2(DEPTH),
  localparam int KW     = $clog2(SRP_SAMPLES)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NUM_SUBARRAYS-1:0]    subarray_en,
  // write side, from the filter stage
  input  logic                        wr_valid,
  input  sample_t                     wr_data [NUM_MICS],
  input  logic [AW-1:0]               wptr,
  // read side, from the control unit and the delay table
  input  logic                        rd_en,
  input  logic [KW-1:0]               rd_k,
  input  logic [AW-1:0]               rd_base,
  input  logic                        rd_first,
  input  logic                        rd_last,
  input  logic [NUM_MICS*DELAY_W-1:0] delays,
  // aligned, decimated samples to the detection stage
  output logic                        rd_valid_o,
  output logic                        rd_first_o,
  output logic                        rd_last_o,
  output sample_t                     rd_data [NUM_MICS]
);
  logic [NUM_MICS-1:0] mic_en, mic_en_q;
  sample_t             mem_q [NUM_MICS];

  for (genvar m = 0; m < NUM_MICS; m++) begin : g_mic
    logic [AW-1:0] raddr;
    assign mic_en[m] = subarray_en[subarray_of(m)];
    assign raddr = rd_base - AW'(delays[m*DELAY_W +: DELAY_W])
                 - AW'(D_FIR) * AW'(rd_k);

    delay_memory #(.DEPTH(DEPTH), .DATA_W(DATA_W)) u_mem (
      .clk,
      .en   (mic_en[m]),
      .we   (wr_valid),
      .waddr(wptr),
      .wdata(wr_data[m]),
      .re   (rd_en),
      .raddr(raddr),
      .rdata(mem_q[m]));

    assign rd_data[m] = mic_en_q[m] ? mem_q[m] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid_o <= 1'b0;
      rd_first_o <= 1'b0;
      rd_last_o  <= 1'b0;
      mic_en_q   <= '0;
    end else begin
      rd_valid_o <= rd_en;
      rd_first_o <= rd_en & rd_first;
      rd_last_o  <= rd_en & rd_last;
      if (rd_en) mic_en_q <= mic_en;
    end
  end
endmodule
