// delay_rom: pre-computed delays of every microphone for every orientation.
//
// The orientations form a W_PIX x H_PIX rectangular grid on the plane z = 1
// in front of the array, spanning the camera's field of view FOV_DEG
// horizontally (pixel centres, square pixels, so the vertical span is
// H_PIX/W_PIX of the horizontal one). Each grid point is normalised to a
// unit vector u; the delay of microphone m, in samples of the delay memory
// (130.208 kHz), is
//     d[o][m] = DELAY_OFFSET + round( (u . p_m) * MEM_FS_HZ / SOUND_MPS )
// where p_m is the microphone position. The offset makes every delay
// non-negative. Orientation o = row*W_PIX + col is listed row by row.
// The table is filled at elaboration/initialisation time, which is the
// source's "computed during compilation"; the grid rule follows the source,
// pixel centring, row order and the offset are this design's choices.
//
// Interface: addr selects an orientation, delays (NUM_MICS fields of
// DELAY_W bits, microphone 0 in the low bits) appears one clock later.
module delay_rom
  import ac_pkg::*;
#(
  parameter int  W_PIX        = 160,
  parameter int  H_PIX        = 120,
  parameter real FOV_DEG      = 51.0,
  parameter int  DELAY_W      = 5,
  parameter int  DELAY_OFFSET = 8,
  localparam int N_O          = W_PIX * H_PIX,
  localparam int OW           = (N_O > 1) ? $clog2(N_O) : 1
) (
  input  logic                          clk,
  input  logic [OW-1:0]                 addr,
  output logic [NUM_MICS*DELAY_W-1:0]   delays
);
  typedef logic [NUM_MICS*DELAY_W-1:0] word_t;

  word_t rom [N_O];

  // Half-width of the grid on z = 1, and metres-to-samples scale (the
  // positions are in micrometres).
  localparam real TAN_HALF = $tan(FOV_DEG * 3.14159265358979 / 360.0);
  localparam real SCALE    = 1.0e-6 * MEM_FS_HZ / SOUND_MPS;
  localparam int  MAX_D    = (1 << DELAY_W) - 1;

  // Offset, round to nearest (int'() rounds half away from zero) and clamp
  // to the field width.
  function automatic logic [DELAY_W-1:0] quant(input real s);
    return (s <= -real'(DELAY_OFFSET)) ? '0 :
           (s >= real'(MAX_D - DELAY_OFFSET)) ? DELAY_W'(MAX_D) :
           DELAY_W'(DELAY_OFFSET + int'(s));
  endfunction

  // One row of the table. Kept to few statements per microphone so that
  // tools evaluating the initial loop at elaboration stay within their
  // constant-evaluation budget.
  function automatic word_t entry(input int o);
    real   x, y, k;
    word_t w;
    x = TAN_HALF * (2.0 * (o % W_PIX) + 1.0 - W_PIX) / W_PIX;
    y = TAN_HALF * (2.0 * (o / W_PIX) + 1.0 - H_PIX) / W_PIX;
    k = SCALE / $sqrt(x * x + y * y + 1.0);
    for (int m = 0; m < NUM_MICS; m++)
      w[m*DELAY_W +: DELAY_W] = quant(k * (x * MIC_X_UM[m] + y * MIC_Y_UM[m]));
    return w;
  endfunction

  initial begin
    for (int o = 0; o < N_O; o++) rom[o] = entry(o);
  end

  always_ff @(posedge clk) delays <= rom[addr];
endmodule
