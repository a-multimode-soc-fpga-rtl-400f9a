// tb_delay_memory: random writes and reads against an array model,
// checking the one-clock read latency and that nothing is written or read
// while en is low (the read data then holds its last value).
module tb_delay_memory;
  localparam int DEPTH = 512, W = 32, AW = 9;
  logic clk = 0, en = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  delay_memory #(.DEPTH(DEPTH), .DATA_W(W)) dut (.clk, .en, .we, .waddr, .wdata, .re, .raddr, .rdata);
  always #5 clk = ~clk;

  logic [W-1:0] model [DEPTH];
  logic [W-1:0] exp_q;
  logic         exp_v = 0;


  initial begin
    // fill every word
    en <= 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk);
      we <= 1; waddr <= AW'(a); wdata <= $urandom; model[a] = 'x;
    end
    @(posedge clk); we <= 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) model[a] = dut.mem[a];
    for (int t = 0; t < 3000; t++) begin
      logic doen, dow, dor;
      logic [AW-1:0] wa, ra;
      logic [W-1:0] wd;
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin failures++; if (failures < 10) $display("got %h exp %h", rdata, exp_q); end
      end
      doen = ($urandom % 4) != 0; dow = $urandom % 2; dor = $urandom % 2;
      wa = AW'($urandom); ra = AW'($urandom); wd = $urandom;
      if (ra == wa) ra = ra + 1'b1;
      en = doen; we = dow; waddr = wa; wdata = wd; re = dor; raddr = ra;
      if (doen && dor) begin exp_q = model[ra]; end
      exp_v = 1;
      if (doen && dow) model[wa] = wd;
    end
    @(negedge clk); en = 0; exp_v = 0;
    // final sweep: contents equal the model (writes with en low were dropped)
    en = 1; we = 0; re = 1;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) failures++;
    end
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
