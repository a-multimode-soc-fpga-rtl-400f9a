// tb_acoustic_camera_resolutions: the other orientation grids of the
// design's performance table, 40 x 30, 80 x 60 and 320 x 240, each a rebuild
// of the front end with its own delay table. For each it checks one full
// frame: W*H values ending with the frame flag, a frame time of W*H x 80
// clocks (1.92, 7.68 and 122.88 ms at 50 MHz), the loudest pixel within a
// tenth of the image width of the source, and that the frame is at least
// half the 1.97 ms sensing window long (6144 PDM samples), which the
// smallest grid only just meets.
module tb_acoustic_camera_resolutions;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NR = 3;
  localparam int WS [NR] = '{40, 80, 320};
  localparam int HS [NR] = '{30, 60, 240};

  logic done [NR];
  int   nv [NR], fc [NR], pi [NR], pj [NR], si [NR], sj [NR];
  real  ct [NR];

  for (genvar r = 0; r < NR; r++) begin : g_res
    resolution_run #(.W(WS[r]), .H(HS[r])) u_run (
      .clk, .rst_n, .done(done[r]), .n_values(nv[r]), .frame_clocks(fc[r]),
      .peak_i(pi[r]), .peak_j(pj[r]), .src_i(si[r]), .src_j(sj[r]), .contrast(ct[r]));
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < NR; r++) begin
      int no, di, dj, tol;
      wait (done[r]);
      no = WS[r] * HS[r];
      di = pi[r] - si[r]; dj = pj[r] - sj[r];
      tol = WS[r] / 10;
      $display("%0dx%0d: %0d values, %0d clocks (%f ms at 50 MHz), peak (%0d,%0d) source (%0d,%0d), max/min %f",
               WS[r], HS[r], nv[r], fc[r], fc[r] * 20.0e-6, pi[r], pj[r], si[r], sj[r], ct[r]);
      checks += 5;
      if (nv[r] != no) failures++;
      if (fc[r] < no * 80 - 100 || fc[r] > no * 80 + 100) failures++;
      if (di * di + dj * dj > tol * tol) begin failures++; $display("peak too far"); end
      if (ct[r] < 2.0) failures++;
      if (real'(fc[r]) * 20.0e-9 < 6144.0 / 3.125e6 / 2.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
