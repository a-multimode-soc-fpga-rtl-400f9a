// delay_memory: circular sample buffer of one microphone ("Mem Delay").
//
// A simple dual-port block RAM of DEPTH words of DATA_W bits. The filter
// chain writes one undecimated sample per FIR output at the address given
// by the shared write pointer; the beamformer reads any earlier sample one
// clock after presenting its address. Both ports are gated by en, which is
// low when the microphone's sub-array is switched off, so a disabled memory
// neither writes nor reads (its read data holds). The source keeps the
// filtered samples in BRAM banks; the depth (512, enough for 64 samples at a
// stride of 4 plus the largest delay) is this design's choice.
module delay_memory #(
  parameter int DEPTH  = 512,
  parameter int DATA_W = 32,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (en && re) rdata <= mem[raddr];
  end
endmodule
