// filter_stage: one filter chain per microphone, all running in lock step.
//
// All chains see the same PDM strobe, so their outputs become valid in the
// same clock cycle; the stage reports that cycle with a single out_valid
// (taken from chain 0) and presents all NUM_MICS samples together, which
// lets the delay memories share one write pointer.
module filter_stage
  import ac_pkg::*;
#(
  parameter int NUM_MICS    = ac_pkg::NUM_MICS,
  parameter int MA_LOG2_LEN = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pdm_valid,
  input  logic [NUM_MICS-1:0] pdm_bits,
  output logic                out_valid,
  output sample_t             out_data [NUM_MICS]
);
  logic [NUM_MICS-1:0] valid;

  for (genvar m = 0; m < NUM_MICS; m++) begin : g_chain
    filter_chain #(.MA_LOG2_LEN(MA_LOG2_LEN)) u_chain (
      .clk, .rst_n,
      .pdm_valid, .pdm_bit(pdm_bits[m]),
      .out_valid(valid[m]), .out_data(out_data[m]));
  end

  assign out_valid = valid[0];

  assert property (@(posedge clk) disable iff (!rst_n) valid == '0 || valid == '1)
    else $error("filter_stage: chains out of step");
endmodule
