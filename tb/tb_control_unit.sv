// tb_control_unit: exercises the beamformer sequencer with a 6-orientation
// frame and a filter sample every 40 clocks. Checks: the write pointer
// counts samples; no read starts before 284 samples are stored; every
// orientation issues 64 consecutive reads k = 0..63 with first/last tags and
// rd_base = newest sample; slots are 80 clocks apart; orientations run
// 0..5 and wrap, with orient_last and frame_start in the right places; a
// full FIFO stalls the start of the next slot; a configuration change is
// taken only at a frame start and restarts the fill wait; cfg_run low stops
// new slots.
module tb_control_unit;
  import ac_pkg::*;
  localparam int N_O = 6, OC = 80, FILL = 284;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_run = 0, wr_valid = 0, fifo_full = 0;
  logic [1:0] cfg_subarray_en = 2'b11;
  logic [8:0] wptr, rd_base;
  logic [1:0] subarray_en;
  logic [2:0] orient;
  logic orient_last, rd_en, rd_first, rd_last, frame_start, stat_stall, stat_refill;
  logic [5:0] rd_k;

  control_unit #(.N_O(N_O), .ORIENT_CYCLES(OC)) dut (.clk, .rst_n, .cfg_run, .cfg_subarray_en,
    .wr_valid, .fifo_full, .wptr, .subarray_en, .orient, .orient_last,
    .rd_en, .rd_k, .rd_base, .rd_first, .rd_last, .frame_start, .stat_stall, .stat_refill);

  int cyc = 0, nwr = 0, wr_since_fill = 0, kexp = 0, last_first = -1000;
  int n_orient = 0, n_stall = 0, n_refill = 0, n_frames = 0, exp_orient = 0;
  int stalled_cycles = 0, gap_after_stall = 0;
  logic reading = 0;

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      checks++;
      if (wptr != 9'(nwr)) failures++;
      if (stat_stall) n_stall++;
      if (stat_refill) begin n_refill++; wr_since_fill = 0; end
      if (rd_en) begin
        checks += 2;
        if (rd_k != 6'(kexp)) begin failures++; $display("k %0d exp %0d", rd_k, kexp); end
        if (rd_first != (kexp == 0) || rd_last != (kexp == 63)) failures++;
        if (kexp == 0) begin
          checks += 4;
          if (wr_since_fill < FILL) begin failures++; $display("read before fill (%0d)", wr_since_fill); end
          if (int'(orient) != exp_orient) begin failures++; $display("orient %0d exp %0d", orient, exp_orient); end
          if (orient_last != (exp_orient == N_O - 1)) failures++;
          if (cyc - last_first < OC) begin failures++; $display("slot %0d", cyc - last_first); end
          if (cyc - last_first != OC && !gap_after_stall && n_orient > 0 && orient != 0) begin
            failures++; $display("slot length %0d", cyc - last_first);
          end
          gap_after_stall = 0;
          last_first = cyc;
          n_orient++;
          exp_orient = (exp_orient + 1) % N_O;
        end
        kexp = (kexp + 1) % 64;
      end else begin
        checks++;
        if (kexp != 0) begin failures++; $display("read burst broken at %0d", kexp); kexp = 0; end
      end
      if (frame_start) begin
        n_frames++;
        checks++;
        if (orient != 0) failures++;
      end
      if (fifo_full) gap_after_stall = 1;
    end
    if (wr_valid) begin nwr++; wr_since_fill++; end
  end

  // rd_base must be the newest sample at the start of the slot
  always @(negedge clk) if (rd_en && rd_first) begin
    checks++;
    if (rd_base != 9'(nwr - 1) && rd_base != 9'(nwr - 2)) begin failures++; $display("base %0d nwr %0d", rd_base, nwr); end
  end

  initial begin
    forever begin
      repeat (39) @(posedge clk);
      wr_valid <= 1;
      @(posedge clk);
      wr_valid <= 0;
    end
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cfg_run <= 1;
    repeat (FILL * 40 + 40 * OC) @(posedge clk);
    checks++;
    if (n_orient < 30) begin failures++; $display("only %0d orientations", n_orient); end
    // stall
    fifo_full <= 1;
    t0 = n_orient;
    repeat (600) @(posedge clk);
    checks++;
    if (n_orient - t0 > 1) begin failures++; $display("ran while FIFO full"); end
    fifo_full <= 0;
    repeat (10 * OC) @(posedge clk);
    checks++;
    if (n_orient - t0 < 8) failures++;
    // configuration change: only sub-array 1
    cfg_subarray_en <= 2'b01;
    repeat (N_O * OC + 10) @(posedge clk);
    checks += 2;
    if (subarray_en != 2'b01) failures++;
    if (n_refill != 2) failures++;   // one at start-up, one for the change
    repeat (FILL * 40 + 20 * OC) @(posedge clk);
    // stop
    cfg_run <= 0;
    repeat (2 * OC) @(posedge clk);
    t0 = n_orient;
    repeat (10 * OC) @(posedge clk);
    checks += 4;
    if (n_orient != t0) failures++;
    if (n_stall == 0) failures++;
    if (n_frames < 10) failures++;
    if (n_refill != 2) failures++;   // one at start-up, one for the change
    $display("orientations %0d frames %0d stall cycles %0d refills %0d", n_orient, n_frames, n_stall, n_refill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
