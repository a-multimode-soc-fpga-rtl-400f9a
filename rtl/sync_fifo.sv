// sync_fifo: single-clock FIFO between the detection stage and the
// processing-system link.
//
// The PL-to-PS link is built from FIFOs that the host reads as a stream; this
// FIFO is the programmable-logic side of it. Words are written with wr_en and
// read with rd_en; dout is registered and valid the clock after rd_en, as in
// a standard first-word-fall-through-free FIFO. full and empty are exact.
// Writing when full or reading when empty is a protocol error (assertions);
// such an access is ignored. The depth is this design's choice.
module sync_fifo #(
  parameter int W     = 33,
  parameter int DEPTH = 512,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
    if (do_rd) dout <= mem[rp];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("sync_fifo: write while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("sync_fifo: read while empty");
endmodule
