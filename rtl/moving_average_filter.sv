// moving_average_filter: DC-offset removal, y[n] = x[n] - mean(x[n-L+1..n]).
//
// The source places a moving-average filter after the CIC decimator to take
// out the DC offset of the MEMS microphones, without giving its length. This
// design uses a window of L = 2^LOG2_LEN samples (default 128, 1 ms at the
// CIC output rate) kept in a circular buffer, and a running sum that adds the
// newest and drops the oldest sample. Until the window has been filled once,
// the missing samples count as zero, so the buffer needs no reset. The mean
// is the running sum shifted right by LOG2_LEN (rounding toward minus
// infinity); the result saturates to the 32-bit Q16.16 format.
//
// Timing: out_valid follows in_valid by two clocks (buffer read, then
// subtract); a new sample may arrive every third clock or slower.
module moving_average_filter
  import ac_pkg::*;
#(
  parameter int LOG2_LEN = 7
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);
  localparam int LEN   = 1 << LOG2_LEN;
  localparam int SUM_W = DATA_W + LOG2_LEN;
  typedef logic signed [SUM_W-1:0] sum_t;

  sample_t               buf_mem [LEN];
  logic [LOG2_LEN-1:0]   ptr;
  logic                  filled;
  logic                  stage1;
  sample_t               x_q, old_q;
  sum_t                  sum;
  sum_t                  sum_new;
  sum_t                  diff;

  // buffer: write newest, read the sample leaving the window
  always_ff @(posedge clk) begin
    if (in_valid) begin
      buf_mem[ptr] <= in_data;
      old_q        <= buf_mem[ptr];
      x_q          <= in_data;
    end
  end

  assign sum_new = sum + sum_t'(x_q) - (filled ? sum_t'(old_q) : '0);
  assign diff    = sum_t'(x_q) - (sum_new >>> LOG2_LEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      filled    <= 1'b0;
      stage1    <= 1'b0;
      sum       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      stage1    <= in_valid;
      out_valid <= 1'b0;
      if (in_valid) begin
        ptr <= ptr + 1'b1;
      end
      if (stage1) begin
        sum       <= sum_new;
        if (ptr == '0) filled <= 1'b1;
        out_valid <= 1'b1;
        if (diff > sum_t'({1'b0, {(DATA_W-1){1'b1}}}))
          out_data <= {1'b0, {(DATA_W-1){1'b1}}};
        else if (diff < -sum_t'({1'b0, {(DATA_W-1){1'b1}}}) - 1)
          out_data <= {1'b1, {(DATA_W-1){1'b0}}};
        else
          out_data <= sample_t'(diff);
      end
    end
  end
endmodule
