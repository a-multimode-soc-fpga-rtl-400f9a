// detection_stage: sums of the aligned samples and the steered response
// power (SRP) of one orientation.
//
// Pipeline, one aligned sample set per clock:
//   1. per-sub-array sums (4 and 8 microphones), held in one register per
//      sub-array (the "Mem Delay Sub-Array" elements of the block diagram),
//   2. the beam sample b = sum of both sub-arrays,
//   3. b squared,
//   4. accumulation of b^2 over the SRP_SAMPLES samples between the first
//      and last tags.
// At the last sample the full-precision power is shifted right by OUT_SHIFT
// and saturated to 32 bits. The source gives the sub-array sums, their sum
// and the power per angle over 64 samples; the widths, the output scaling
// and the pipeline split are this design's choices.
//
// Timing: out_valid pulses 4 clocks after the in_valid that carries
// in_last; a new orientation may start on the next clock.
module detection_stage
  import ac_pkg::*;
#(
  parameter int OUT_SHIFT = 24
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  logic    in_last,
  input  sample_t in_data [NUM_MICS],
  output logic    out_valid,
  output logic [31:0] out_power
);
  localparam int SUM_W = DATA_W + $clog2(NUM_MICS);
  localparam int SQ_W  = 2 * SUM_W;
  localparam int ACC_W = SQ_W + $clog2(SRP_SAMPLES);
  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic [SQ_W-1:0]         sq_t;
  typedef logic [ACC_W-1:0]        acc_t;

  sum_t sub_sum [NUM_SUBARRAYS];
  sum_t sub_q   [NUM_SUBARRAYS];
  sum_t beam_q;
  sq_t  sq_q;
  acc_t acc, acc_next, shifted;
  logic [3:1] v, f, l;

  always_comb begin
    for (int s = 0; s < NUM_SUBARRAYS; s++) sub_sum[s] = '0;
    for (int m = 0; m < NUM_MICS; m++)
      sub_sum[subarray_of(m)] = sub_sum[subarray_of(m)] + sum_t'(in_data[m]);
  end

  assign acc_next = (f[3] ? '0 : acc) + acc_t'(sq_q);
  assign shifted  = acc_next >> OUT_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SUBARRAYS; s++) sub_q[s] <= '0;
      beam_q    <= '0;
      sq_q      <= '0;
      acc       <= '0;
      v         <= '0;
      f         <= '0;
      l         <= '0;
      out_valid <= 1'b0;
      out_power <= '0;
    end else begin
      v <= {v[2:1], in_valid};
      f <= {f[2:1], in_valid & in_first};
      l <= {l[2:1], in_valid & in_last};
      if (in_valid) for (int s = 0; s < NUM_SUBARRAYS; s++) sub_q[s] <= sub_sum[s];
      if (v[1]) beam_q <= sub_q[0] + sub_q[1];
      if (v[2]) sq_q   <= sq_t'(beam_q * beam_q);
      out_valid <= 1'b0;
      if (v[3]) begin
        acc <= acc_next;
        if (l[3]) begin
          out_valid <= 1'b1;
          out_power <= (shifted > acc_t'(32'hFFFF_FFFF)) ? 32'hFFFF_FFFF : shifted[31:0];
        end
      end
    end
  end
endmodule
