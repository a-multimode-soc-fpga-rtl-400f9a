// pdm_interface: PDM clock generation and capture of paired microphones.
//
// The array is wired as six microphone pairs; the two microphones of a pair
// share one clock line and one data line. This block divides the system
// clock by CLK_DIV (50 MHz / 16 = 3.125 MHz, the PDM sampling frequency of
// the design) and drives the same clock on all six clock lines. Within one
// PDM period, the first microphone of a pair (even index) is taken to drive
// the data line while the clock is high and the second (odd index) while it
// is low; each half is sampled in the last system-clock cycle before the
// clock edge that ends it. The edge assignment is this design's choice.
//
// Interface: mic_bits_o[2*l] and mic_bits_o[2*l+1] are the samples of line
// l; bits_valid_o pulses for one system clock once per PDM period, when a
// fresh pair of bits for every line is present. Data lines are registered
// once before sampling.
module pdm_interface #(
  parameter int CLK_DIV   = 16,
  parameter int NUM_LINES = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [NUM_LINES-1:0]   pdm_clk_o,
  input  logic [NUM_LINES-1:0]   pdm_data_i,
  output logic [2*NUM_LINES-1:0] mic_bits_o,
  output logic                   bits_valid_o
);
  localparam int CW = $clog2(CLK_DIV);
  localparam int HALF = CLK_DIV / 2;

  logic [CW-1:0]        cnt;
  logic                 clk_q;
  logic [NUM_LINES-1:0] data_q;
  logic [NUM_LINES-1:0] hi_bits;

  initial assert (CLK_DIV >= 4 && CLK_DIV % 2 == 0) else $error("CLK_DIV must be even and >= 4");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      clk_q        <= 1'b0;
      data_q       <= '0;
      hi_bits      <= '0;
      mic_bits_o   <= '0;
      bits_valid_o <= 1'b0;
    end else begin
      data_q       <= pdm_data_i;
      bits_valid_o <= 1'b0;
      cnt          <= (cnt == CW'(CLK_DIV-1)) ? '0 : cnt + 1'b1;
      clk_q        <= (cnt == CW'(CLK_DIV-1)) || (cnt < CW'(HALF-1));
      if (cnt == CW'(HALF-1)) hi_bits <= data_q;
      if (cnt == CW'(CLK_DIV-1)) begin
        for (int l = 0; l < NUM_LINES; l++) begin
          mic_bits_o[2*l]   <= hi_bits[l];
          mic_bits_o[2*l+1] <= data_q[l];
        end
        bits_valid_o <= 1'b1;
      end
    end
  end

  assign pdm_clk_o = {NUM_LINES{clk_q}};
endmodule
