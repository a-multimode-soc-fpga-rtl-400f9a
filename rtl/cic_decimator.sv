// cic_decimator: N-th order cascaded integrator-comb decimator for a
// 1-bit PDM stream (default 4th order, decimation 24, differential delay 1).
//
// Each PDM bit is mapped to +1 / -1 and fed to N integrators that run at the
// PDM rate (in_valid). Every R-th input the last integrator is passed to N
// comb sections, which run at the decimated rate. The registers are
// ACC_W = 2 + ceil(N*log2(R)) bits wide and wrap, as usual for a CIC. The
// result, gain R^N (= 331776 for the defaults), is sign-extended to the
// 32-bit Q16.16 sample format without rescaling, so a full-scale PDM input
// reads as about +/-5.06. The source gives order, decimation and the 32-bit
// output format; the unscaled output and the register width are choices of
// this design.
//
// Timing: out_valid pulses one clock after every R-th in_valid.
module cic_decimator
  import ac_pkg::*;
#(
  parameter int N = CIC_N,
  parameter int R = CIC_R
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_bit,
  output logic    out_valid,
  output sample_t out_data
);
  localparam int ACC_W = 2 + $clog2(R) * N;
  localparam int RW    = $clog2(R);
  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t          integ [N];
  acc_t          comb_dly [N];
  logic [RW-1:0] dec_cnt;
  acc_t          c;
  acc_t          comb_next [N];
  acc_t          x_in;

  initial assert (ACC_W <= DATA_W) else $error("CIC register wider than the sample format");

  assign x_in = in_bit ? acc_t'(1) : -acc_t'(1);

  // comb cascade on the registered output of the last integrator
  always_comb begin
    c = integ[N-1];
    for (int k = 0; k < N; k++) begin
      comb_next[k] = c;
      c = c - comb_dly[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        integ[k]    <= '0;
        comb_dly[k] <= '0;
      end
      dec_cnt   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ[0] <= integ[0] + x_in;
        for (int k = 1; k < N; k++) integ[k] <= integ[k] + integ[k-1];
        if (dec_cnt == RW'(R-1)) begin
          dec_cnt <= '0;
          for (int k = 0; k < N; k++) comb_dly[k] <= comb_next[k];
          out_valid <= 1'b1;
          out_data  <= sample_t'(c);
        end else begin
          dec_cnt <= dec_cnt + 1'b1;
        end
      end
    end
  end
endmodule
