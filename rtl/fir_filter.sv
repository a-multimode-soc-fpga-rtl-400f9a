// fir_filter: serial low-pass FIR, one multiply-accumulate per PDM sample.
//
// The filter keeps the last TAPS input samples in a shift register. When a
// sample arrives (in_valid) it is shifted in and the accumulator is cleared;
// afterwards one product h[k]*x[n-k] is added on every mac_en strobe, which
// in the chain is the PDM-rate strobe. With a decimation of 24 in the CIC,
// exactly 24 PDM strobes separate two inputs, so the serial filter can have
// at most 24 taps: that is why the order is tied to the CIC decimation
// factor. Coefficients are signed COEF_W-bit Q1.15 numbers; the accumulator
// holds the full product width, and the result is shifted back to Q16.16
// with rounding and saturated to 32 bits. The filter does not decimate: the
// decimation by D_FIR happens when the delay memories are read.
//
// Timing: out_valid pulses two clocks after the TAPS-th mac_en that follows
// in_valid. in_valid must not arrive while a sum is still in progress
// (checked by an assertion).
module fir_filter
  import ac_pkg::*;
#(
  parameter int    TAPS   = FIR_TAPS,
  parameter int    COEF_W = ac_pkg::COEF_W,
  parameter coef_t COEFS [FIR_TAPS] = FIR_COEFS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  input  logic    mac_en,
  output logic    out_valid,
  output sample_t out_data
);
  localparam int CW    = $clog2(TAPS + 1);
  localparam int ACC_W = DATA_W + COEF_W + $clog2(TAPS);
  typedef logic signed [ACC_W-1:0] acc_t;

  sample_t       taps_q [TAPS];
  acc_t          acc;
  logic [CW-1:0] k;
  logic          busy;
  acc_t          prod;
  acc_t          rounded;
  acc_t          scaled;

  initial assert (TAPS <= FIR_TAPS) else $error("TAPS exceeds the coefficient table");

  assign prod    = acc_t'(taps_q[k[CW-1:0] < CW'(TAPS) ? k : '0]) * acc_t'(COEFS[k < CW'(TAPS) ? k : '0]);
  assign rounded = acc + (acc_t'(1) <<< (COEF_W-2));
  assign scaled  = rounded >>> (COEF_W-1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) taps_q[i] <= '0;
      acc       <= '0;
      k         <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        taps_q[0] <= in_data;
        for (int i = 1; i < TAPS; i++) taps_q[i] <= taps_q[i-1];
        acc  <= '0;
        k    <= '0;
        busy <= 1'b1;
      end else if (busy && mac_en) begin
        acc <= acc + prod;
        if (k == CW'(TAPS-1)) begin
          busy <= 1'b0;
        end
        k <= k + 1'b1;
      end else if (busy == 1'b0 && k == CW'(TAPS)) begin
        k         <= '0;
        out_valid <= 1'b1;
        if (scaled > acc_t'({1'b0, {(DATA_W-1){1'b1}}}))
          out_data <= {1'b0, {(DATA_W-1){1'b1}}};
        else if (scaled < -acc_t'({1'b0, {(DATA_W-1){1'b1}}}) - 1)
          out_data <= {1'b1, {(DATA_W-1){1'b0}}};
        else
          out_data <= sample_t'(scaled);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !busy)
    else $error("fir_filter: new sample while the previous sum is in progress");
endmodule
