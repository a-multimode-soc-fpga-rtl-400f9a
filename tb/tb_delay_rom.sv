// tb_delay_rom: reads every entry of a small (8 x 6) and of the full
// (160 x 120) delay table and compares it with delays computed here from the
// polar form of each grid direction (elevation atan(r), azimuth atan2(y,x)),
// rounded to samples of 130.208 kHz plus the offset of 8. Checks the
// one-clock read latency, that the full table spans exactly 0..16 (the
// +/-8 sample aperture, nothing clipped) and that it is antisymmetric.
module tb_delay_rom;
  import ac_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]  a_s = '0;
  logic [5:0]  addr_s = '0;
  logic [59:0] d_s;
  logic [14:0] addr_f = '0;
  logic [59:0] d_f;

  delay_rom #(.W_PIX(8), .H_PIX(6)) u_small (.clk, .addr(addr_s), .delays(d_s));
  delay_rom u_full (.clk, .addr(addr_f), .delays(d_f));

  function automatic int ref_delay(input int o, input int m, input int w, input int h);
    real t, x, y, el, az, proj;
    t  = $tan(51.0 / 2.0 * 3.14159265358979 / 180.0);
    x  = t * (2.0 * (o % w) + 1.0 - w) / w;
    y  = t * (2.0 * (o / w) + 1.0 - h) / w;
    el = $atan($sqrt(x * x + y * y));
    az = $atan2(y, x);
    proj = $sin(el) * ($cos(az) * MIC_X_UM[m] + $sin(az) * MIC_Y_UM[m]) * 1.0e-6;
    return 8 + int'($floor(proj / 343.0 * 3.125e6 / 24.0 + 0.5));
  endfunction

  initial begin
    int mn = 99, mx = -1;
    for (int o = 0; o < 48; o++) begin
      @(negedge clk); addr_s = 6'(o);
      @(negedge clk);
      for (int m = 0; m < NUM_MICS; m++) begin
        checks++;
        if (int'(d_s[m*5 +: 5]) != ref_delay(o, m, 8, 6)) begin
          failures++;
          $display("small o=%0d m=%0d got %0d exp %0d", o, m, d_s[m*5 +: 5], ref_delay(o, m, 8, 6));
        end
      end
    end
    for (int o = 0; o < 19200; o++) begin
      @(negedge clk); addr_f = 15'(o);
      @(negedge clk);
      for (int m = 0; m < NUM_MICS; m++) begin
        int d;
        d = int'(d_f[m*5 +: 5]);
        checks++;
        if (d != ref_delay(o, m, 160, 120)) begin
          failures++;
          if (failures < 10) $display("full o=%0d m=%0d got %0d exp %0d", o, m, d, ref_delay(o, m, 160, 120));
        end
        if (d < mn) mn = d;
        if (d > mx) mx = d;
        // opposite direction, same microphone: delays mirror about 8
        checks++;
        if (int'(u_full.rom[19199 - o][m*5 +: 5]) != 16 - d) failures++;
      end
    end
    checks++;
    if (mn != 0 || mx != 16) begin failures++; $display("range %0d..%0d", mn, mx); end
    $display("delay range %0d..%0d", mn, mx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
