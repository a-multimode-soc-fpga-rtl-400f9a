// control_unit: sequencing of the delay-and-sum beamformer.
//
// Write side: every filter-stage output advances the shared write pointer of
// the delay memories and a fill counter. Beamforming only starts once
// FILL_SAMPLES samples are present, enough for the oldest read of an
// orientation (largest delay + D_FIR*(SRP_SAMPLES-1)).
//
// Read side: the orientations 0..N_O-1 of a frame are processed one after
// the other, each in a fixed slot of ORIENT_CYCLES clocks (80 by default, the
// latency per orientation that the source reports). Slot phase 0 waits until
// the unit is enabled, the memories are filled and the output FIFO has room
// (a full FIFO stalls the beamformer here); it then freezes the newest
// sample index as rd_base. Phases 2..65 issue the SRP_SAMPLES reads k=0..63
// (tagged first/last); the SRP leaves the detection stage at phase 70, and
// the rest of the slot is idle. The configuration (which sub-arrays are
// active) is taken at the start of each frame; if it changed, the fill
// counter restarts, because a memory that was switched off holds stale
// samples. The delay table address is the current orientation index and is
// stable during its slot. The schedule inside the slot is this design's.
//
// Status outputs pulse once per event: stat_stall for every clock spent
// waiting on a full FIFO, stat_refill when a configuration change restarts
// the fill, frame_start at orientation 0.
module control_unit
  import ac_pkg::*;
#(
  parameter int N_O           = 19200,
  parameter int ORIENT_CYCLES = 80,
  parameter int DEPTH         = 512,
  parameter int DELAY_W       = 5,
  localparam int AW           = $clog2(DEPTH),
  localparam int OW           = (N_O > 1) ? $clog2(N_O) : 1,
  localparam int KW           = $clog2(SRP_SAMPLES),
  localparam int PW           = $clog2(ORIENT_CYCLES),
  localparam int FILL_SAMPLES = D_FIR * (SRP_SAMPLES - 1) + (1 << DELAY_W)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_run,
  input  logic [NUM_SUBARRAYS-1:0] cfg_subarray_en,
  input  logic                     wr_valid,
  input  logic                     fifo_full,
  output logic [AW-1:0]            wptr,
  output logic [NUM_SUBARRAYS-1:0] subarray_en,
  output logic [OW-1:0]            orient,
  output logic                     orient_last,
  output logic                     rd_en,
  output logic [KW-1:0]            rd_k,
  output logic [AW-1:0]            rd_base,
  output logic                     rd_first,
  output logic                     rd_last,
  output logic                     frame_start,
  output logic                     stat_stall,
  output logic                     stat_refill
);
  localparam int RD_START = 2;
  localparam int FW = $clog2(FILL_SAMPLES + 1);

  logic [PW-1:0] phase;
  logic [FW-1:0] fill_cnt;
  logic          filled;
  logic          cfg_change;
  logic          can_start;

  initial assert (ORIENT_CYCLES >= RD_START + SRP_SAMPLES + 6)
    else $error("ORIENT_CYCLES too short for the read and detection pipeline");
  initial assert (FILL_SAMPLES + 1 < DEPTH)
    else $error("delay memory too shallow for the read window");

  assign filled      = (fill_cnt == FW'(FILL_SAMPLES));
  assign cfg_change  = (orient == '0) && (cfg_subarray_en != subarray_en);
  assign can_start   = cfg_run && filled && !fifo_full && !cfg_change;
  assign orient_last = (orient == OW'(N_O - 1));

  always_comb begin
    rd_en    = (phase >= PW'(RD_START)) && (phase < PW'(RD_START + SRP_SAMPLES));
    rd_k     = KW'(phase - PW'(RD_START));
    rd_first = rd_en && (phase == PW'(RD_START));
    rd_last  = rd_en && (phase == PW'(RD_START + SRP_SAMPLES - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      fill_cnt    <= '0;
      subarray_en <= '0;
      phase       <= '0;
      orient      <= '0;
      rd_base     <= '0;
      frame_start <= 1'b0;
      stat_stall  <= 1'b0;
      stat_refill <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      stat_stall  <= 1'b0;
      stat_refill <= 1'b0;

      if (wr_valid) wptr <= wptr + 1'b1;

      if (phase == '0 && cfg_change) begin
        subarray_en <= cfg_subarray_en;
        fill_cnt    <= '0;
        stat_refill <= 1'b1;
      end else if (wr_valid && !filled) begin
        fill_cnt <= fill_cnt + 1'b1;
      end

      if (phase == '0) begin
        if (can_start) begin
          phase       <= PW'(1);
          rd_base     <= wptr - 1'b1;
          frame_start <= (orient == '0);
        end
        stat_stall <= cfg_run && filled && !cfg_change && fifo_full;
      end else if (phase == PW'(ORIENT_CYCLES - 1)) begin
        phase  <= '0;
        orient <= orient_last ? '0 : orient + 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end
endmodule
