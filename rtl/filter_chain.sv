// filter_chain: the filter chain of one microphone.
//
// A 1-bit PDM stream at 3.125 MHz goes through a 4th-order CIC decimating
// by 24, a moving-average DC-offset remover and a serial 24-tap low-pass FIR.
// The output is a signed Q16.16 audio sample at 3.125 MHz / 24 = 130.208 kHz,
// not yet decimated further (the last decimation by 4 is done by the
// delay-memory reads). The order of the filters follows the source; the
// filter lengths not given there are the defaults of the sub-blocks.
//
// Interface: pdm_valid is the PDM-rate strobe, pdm_bit the sample; it also
// clocks the serial FIR. out_valid pulses once per 24 strobes after the
// pipeline has started.
module filter_chain
  import ac_pkg::*;
#(
  parameter int MA_LOG2_LEN = 7
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    pdm_valid,
  input  logic    pdm_bit,
  output logic    out_valid,
  output sample_t out_data
);
  logic    cic_valid, ma_valid;
  sample_t cic_data, ma_data;

  cic_decimator u_cic (
    .clk, .rst_n,
    .in_valid (pdm_valid), .in_bit (pdm_bit),
    .out_valid(cic_valid), .out_data(cic_data));

  moving_average_filter #(.LOG2_LEN(MA_LOG2_LEN)) u_ma (
    .clk, .rst_n,
    .in_valid (cic_valid), .in_data (cic_data),
    .out_valid(ma_valid),  .out_data(ma_data));

  fir_filter u_fir (
    .clk, .rst_n,
    .in_valid (ma_valid), .in_data (ma_data), .mac_en(pdm_valid),
    .out_valid(out_valid), .out_data(out_data));
endmodule
