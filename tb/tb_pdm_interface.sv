// tb_pdm_interface: checks the PDM clock and the capture of paired
// microphones. A model of each microphone pair drives the first microphone's
// bit while the PDM clock is high and the second's while it is low, with
// fresh random bits every PDM period. The testbench checks every captured
// pair against the bits it drove, the PDM clock period and the spacing of
// the valid strobes (CLK_DIV system clocks).
module tb_pdm_interface;
  localparam int CLK_DIV = 16;
  localparam int L = 6;

  logic clk = 0, rst_n = 0;
  logic [L-1:0] pdm_clk, pdm_data;
  logic [2*L-1:0] bits;
  logic valid;
  int checks = 0, failures = 0;

  pdm_interface #(.CLK_DIV(CLK_DIV), .NUM_LINES(L)) dut (
    .clk, .rst_n, .pdm_clk_o(pdm_clk), .pdm_data_i(pdm_data),
    .mic_bits_o(bits), .bits_valid_o(valid));

  always #5 clk = ~clk;

  logic [L-1:0] cur_a, cur_b, exp_a, exp_b;
  logic prev_clk = 0;
  logic have_exp = 0;
  int   last_valid = -1, last_rise = -1, cyc = 0, nvalid = 0;

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      if (pdm_clk[0] && !prev_clk) begin
        if (last_rise >= 0 && nvalid > 1) begin
          checks++;
          if (cyc - last_rise != CLK_DIV) begin failures++; $display("clock period %0d", cyc - last_rise); end
        end
        last_rise = cyc;
        exp_a = cur_a; exp_b = cur_b; have_exp = last_rise >= 0;
        cur_a = L'($urandom); cur_b = L'($urandom);
      end
      for (int l = 0; l < L; l++) begin
        checks++;
        if (pdm_clk[l] != pdm_clk[0]) failures++;
      end
      prev_clk = pdm_clk[0];
      pdm_data = pdm_clk[0] ? cur_a : cur_b;
      if (valid) begin
        nvalid++;
        if (nvalid > 1) begin
          for (int l = 0; l < L; l++) begin
            checks += 2;
            if (bits[2*l] != exp_a[l] || bits[2*l+1] != exp_b[l]) begin
              failures++;
              $display("line %0d: got %b%b exp %b%b", l, bits[2*l], bits[2*l+1], exp_a[l], exp_b[l]);
            end
          end
          checks++;
          if (cyc - last_valid != CLK_DIV) begin failures++; $display("valid spacing %0d", cyc - last_valid); end
        end
        last_valid = cyc;
      end
    end
  end

  initial begin
    cur_a = '0; cur_b = '0; exp_a = '0; exp_b = '0; pdm_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (CLK_DIV * 300) @(posedge clk);
    checks++;
    if (nvalid < 290) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
