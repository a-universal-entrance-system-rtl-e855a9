// sync_fifo_tb: random push/pop test of the single-clock FIFO against a
// queue model, including full, empty, clear and the overwrite-last rule on
// push to a full FIFO (one instance with and one without it).
`timescale 1ns/1ps
module sync_fifo_tb;
  localparam int D = 16;
  logic clk = 0, rst_n = 1, clr = 0, push = 0, pop = 0;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic [7:0] wdata = 0, rdata_a, rdata_b;
  logic empty_a, full_a, empty_b, full_b;
  logic [4:0] count_a, count_b;
  int checks = 0, failures = 0;
  byte unsigned qa[$], qb[$];

  sync_fifo #(.DEPTH(D), .WIDTH(8), .OVERWRITE_LAST(1'b1)) dut_a (.clk, .rst_n, .clr, .push, .wdata, .pop,
    .rdata(rdata_a), .empty(empty_a), .full(full_a), .count(count_a));
  sync_fifo #(.DEPTH(D), .WIDTH(8), .OVERWRITE_LAST(1'b0)) dut_b (.clk, .rst_n, .clr, .push, .wdata, .pop,
    .rdata(rdata_b), .empty(empty_b), .full(full_b), .count(count_b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic model(ref byte unsigned q[$], input bit ovw);
    bit p = pop && q.size() > 0;
    if (p) void'(q.pop_front());
    if (push) begin
      if (q.size() < D) q.push_back(wdata);
      else if (ovw) q[q.size()-1] = wdata;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(empty_a == (qa.size() == 0) && full_a == (qa.size() == D) && count_a == 5'(qa.size()), "flags A");
      check(empty_b == (qb.size() == 0) && full_b == (qb.size() == D) && count_b == 5'(qb.size()), "flags B");
      if (qa.size() > 0) check(rdata_a == qa[0], $sformatf("head A %02h exp %02h", rdata_a, qa[0]));
      if (qb.size() > 0) check(rdata_b == qb[0], "head B");
      // phases: fill past full, then drain, then random
      push  = (t % 600 < 200) ? 1'b1 : (t % 600 < 400) ? 1'b0 : 1'($urandom_range(0, 1));
      pop   = (t % 600 < 200) ? 1'b0 : (t % 600 < 400) ? 1'b1 : 1'($urandom_range(0, 1));
      wdata = 8'($urandom);
      clr   = (t == 2500);
      @(posedge clk);
      if (clr) begin qa = {}; qb = {}; end
      else begin model(qa, 1); model(qb, 0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
