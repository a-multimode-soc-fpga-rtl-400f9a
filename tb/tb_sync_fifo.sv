// tb_sync_fifo: random pushes and pops, never writing when full or reading
// when empty, compared with a queue model: data order, registered dout one
// clock after rd_en, and exact full, empty and count flags. Bursts fill the
// FIFO completely and drain it.
module tb_sync_fifo;
  localparam int W = 33, DEPTH = 16;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [4:0] count;
  int checks = 0, failures = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .din, .full, .rd_en, .dout, .empty, .count);
  always #5 clk = ~clk;

  logic [W-1:0] q [$];
  logic [W-1:0] exp_d;
  logic         chk = 0;
  int           saw_full = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int pw;
      @(negedge clk);
      if (chk) begin
        checks++;
        if (dout !== exp_d) begin failures++; if (failures < 10) $display("got %h exp %h", dout, exp_d); end
      end
      checks += 3;
      if (full !== (q.size() == DEPTH)) failures++;
      if (empty !== (q.size() == 0)) failures++;
      if (count !== 5'(q.size())) failures++;
      if (full) saw_full++;
      pw = ((t / 300) % 2) ? 80 : 30;   // alternate filling and draining phases
      wr_en = (($urandom % 100) < pw) && !full;
      rd_en = (($urandom % 100) < 100 - pw) && !empty;
      din = {$urandom, 1'($urandom)};
      chk = rd_en;
      if (rd_en) exp_d = q.pop_front();
      if (wr_en) q.push_back(din);
    end
    checks++;
    if (saw_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
