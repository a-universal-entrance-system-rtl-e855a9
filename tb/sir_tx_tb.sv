// sir_tx_tb: self-checking test of the SIR transmitter.
// A queue stands in for the SIR TX FIFO and the testbench makes its own
// 16x tick from the 1.8432 MHz SIR clock. Every output pulse is timed: each
// byte must give one pulse per 0 bit of its UART frame (start bit, data LSB
// first, stop bit), at the start of the bit cell, 3/16 of a bit long, and
// nothing for 1 bits. Checked at 9600 and 115200 b/s, including the frame
// length of 10 bit times and back-to-back bytes.
`timescale 1ns/1ps
module sir_tx_tb;
  logic sir_clk = 0, rst_n = 1, enable = 0, tick16 = 0, fifo_pop, ir_txd, busy;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic fifo_empty;
  logic [7:0] fifo_data;
  byte unsigned q[$];
  int checks = 0, failures = 0;
  int div = 12;
  longint cyc = 0;

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 8'h00 : q[0];

  sir_tx dut (.*);

  always #271.267 sir_clk = ~sir_clk;

  int tc = 0;
  logic pop_d = 0;
  // the FIFO model is popped after the edge on which the DUT took the byte
  always @(negedge sir_clk) if (pop_d) void'(q.pop_front());
  always @(posedge sir_clk) begin
    cyc <= cyc + 1;
    tc <= (tc + 1 >= div) ? 0 : tc + 1;
    tick16 <= (tc + 1 >= div);
    pop_d <= fifo_pop;
  end

  // pulse log: start cycle and width in SIR clocks
  longint p_start[$];
  int     p_width[$];
  longint st;
  logic   prev = 0;
  always @(posedge sir_clk) begin
    prev <= ir_txd;
    if (ir_txd && !prev) st = cyc;
    if (!ir_txd && prev) begin p_start.push_back(st); p_width.push_back(int'(cyc - st)); end
  end

  initial begin
    repeat (400000) @(posedge sir_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int d, input byte unsigned bytes[]);
    int bitlen, k;
    longint f0;
    div = d; bitlen = 16 * d;
    p_start = {}; p_width = {};
    foreach (bytes[i]) q.push_back(bytes[i]);
    repeat (30) @(posedge sir_clk);
    enable = 1;
    @(posedge sir_clk);
    while (q.size() > 0 || busy) @(posedge sir_clk);
    repeat (4 * bitlen) @(posedge sir_clk);
    enable = 0;
    // expected pulses, relative to the first (start bit of byte 0)
    k = 0;
    f0 = p_start.size() > 0 ? p_start[0] : 0;
    foreach (bytes[i]) begin
      bit [9:0] fr = {1'b1, bytes[i], 1'b0};
      for (int b = 0; b < 10; b++) if (!fr[b]) begin
        longint exp_t = f0 + longint'(i) * 10 * bitlen + b * bitlen;
        if (k < p_start.size()) begin
          check(p_start[k] == exp_t, $sformatf("div %0d byte %0d bit %0d: pulse at %0d exp %0d", d, i, b, p_start[k] - f0, exp_t - f0));
          check(p_width[k] == 3 * d, $sformatf("div %0d pulse width %0d exp %0d", d, p_width[k], 3 * d));
        end
        k++;
      end
    end
    check(p_start.size() == k, $sformatf("div %0d: %0d pulses, expected %0d", d, p_start.size(), k));
  endtask

  initial begin
    repeat (3) @(posedge sir_clk);
    rst_n = 1;
    run(12, '{8'h55, 8'h00, 8'hFF, 8'h3A});        // 9600 b/s
    run(1,  '{8'hA5, 8'h81, 8'h7E});               // 115200 b/s
    run(3,  '{8'h0F});                             // 38400 b/s
    // nothing is sent while disabled
    p_start = {};
    q.push_back(8'h00);
    repeat (500) @(posedge sir_clk);
    check(p_start.size() == 0 && q.size() == 1, "disabled transmitter stays quiet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
