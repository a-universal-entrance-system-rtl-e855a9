// fir_tx_tb: self-checking test of the 4 Mb/s transmitter.
// A queue stands in for the TX FIFO. The output is sampled once per chip and
// compared with the chip sequence built by the reference frame builder
// (16 PA, STA, 4PPM payload, reference CRC32 FCS, STO). Cases: end of frame
// on underrun with eof_mode, count-outgoing-data mode, underrun abort (line
// stays at break), force break, abort by FIFO clear. Also checks the 4 Mb/s
// rate: 4 clocks of 32 MHz per chip, 64 per payload byte.
`timescale 1ns/1ps
module fir_tx_tb;
  import irphy_tb_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic enable = 0, chip_en = 0, fifo_empty, fifo_pop;
  logic [7:0] fifo_data;
  logic force_break = 0, count_mode = 0, eof_mode = 0, abort_frame = 0;
  logic [15:0] ofdl = 0;
  logic ir_txd, busy, underrun, frame_done;
  int checks = 0, failures = 0;
  int n_underrun = 0, n_done = 0;

  byte unsigned fifo_q[$];
  assign fifo_empty = (fifo_q.size() == 0);
  assign fifo_data  = fifo_empty ? 8'h00 : fifo_q[0];

  fir_tx dut (.*);

  always #15.625 clk = ~clk;

  // chip enable: one clock in four, independent of the DUT
  int ph = 0;
  logic pop_d = 0;
  // the FIFO model is popped after the edge on which the DUT took the byte
  always @(negedge clk) if (pop_d && fifo_q.size() > 0) void'(fifo_q.pop_front());
  always @(posedge clk) begin
    ph <= (ph + 1) % 4;
    chip_en <= (ph == 2);
    pop_d <= fifo_pop;
    if (underrun) n_underrun++;
    if (frame_done) n_done++;
  end

  // chip capture: one sample per chip, taken in the middle of the chip
  bit got[$];
  always @(posedge clk) if (ph == 0) begin
    got.push_back(ir_txd);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // compare captured chips (leading zeros stripped) with the expected frame;
  // `tail_zero` chips after it must be 0
  task automatic compare(chips_t exp, string name);
    int s = 0, errs = 0;
    while (s < got.size() && got[s] == 0) s++;
    check(got.size() - s >= exp.size(), $sformatf("%s: %0d chips captured, %0d expected", name, got.size() - s, exp.size()));
    for (int i = 0; i < exp.size() && s + i < got.size(); i++)
      if (got[s+i] != exp[i]) begin
        if (errs < 3) $display("  %s chip %0d: got %0b exp %0b", name, i, got[s+i], exp[i]);
        errs++;
      end
    check(errs == 0, $sformatf("%s: %0d chip mismatches", name, errs));
    errs = 0;
    for (int i = s + exp.size(); i < got.size(); i++) if (got[i]) errs++;
    check(errs == 0, $sformatf("%s: %0d pulses after the frame", name, errs));
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (40) @(posedge clk);
  endtask

  initial begin
    bytes_t d;
    chips_t e;
    int u0, d0;
    realtime c0, c1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    // 1: eof_mode, frame ends when the FIFO runs empty
    d = {8'h01, 8'hA5, 8'h3C, 8'hFF, 8'h00};
    foreach (d[i]) fifo_q.push_back(d[i]);
    eof_mode = 1; got = {}; u0 = n_underrun; d0 = n_done;
    @(posedge clk); enable = 1;
    @(posedge busy); c0 = $realtime;
    @(negedge busy); c1 = $realtime;
    enable = 0;
    wait_idle();
    e = fir_frame(d, 0);
    compare(e, "eof_mode frame");
    check(n_underrun - u0 == 1, "underrun reported with eof_mode");
    check(n_done - d0 == 1, "frame_done once");
    // busy rises one chip before the first chip and falls as the last is sent: chips * 4 clocks
    check(int'((c1 - c0) / 31.25) == e.size() * 4,
          $sformatf("frame duration %0d clocks, expected %0d", int'((c1 - c0) / 31.25), e.size() * 4));

    // 2: count outgoing data mode, 3 bytes, no underrun
    d = {8'h12, 8'h34, 8'h56};
    foreach (d[i]) fifo_q.push_back(d[i]);
    fifo_q.push_back(8'h99);               // next frame's data stays queued
    eof_mode = 0; count_mode = 1; ofdl = 3; got = {}; u0 = n_underrun; d0 = n_done;
    @(posedge clk); enable = 1;
    @(negedge busy);
    enable = 0;
    wait_idle();
    compare(fir_frame(d, 0), "count mode frame");
    check(n_underrun == u0, "no underrun in count mode");
    check(n_done - d0 == 1, "count mode frame_done");
    check(fifo_q.size() == 1, "count mode leaves next byte in FIFO");
    fifo_q = {};
    count_mode = 0;

    // 3: underrun abort without eof_mode: PA, STA, 2 bytes, then break
    d = {8'hC3, 8'h5A};
    foreach (d[i]) fifo_q.push_back(d[i]);
    got = {}; u0 = n_underrun; d0 = n_done;
    @(posedge clk); enable = 1;
    @(negedge busy);
    enable = 0;
    wait_idle();
    e = {};
    for (int r = 0; r < 16; r++) add_pattern(e, "1000000010101000");
    add_pattern(e, "00001100000011000110000001100000");
    foreach (d[i]) add_byte(e, d[i]);
    compare(e, "underrun abort");
    check(n_underrun - u0 == 1, "underrun reported on abort");
    check(n_done == d0, "no frame_done on abort");

    // 4: force break: no frame starts, line stays 0
    fifo_q.push_back(8'h77);
    force_break = 1; got = {};
    @(posedge clk); enable = 1;
    repeat (200) @(posedge clk);
    begin
      int ones = 0;
      foreach (got[i]) ones += got[i];
      check(ones == 0, "no light while force break");
    end
    check(!busy, "no frame starts under force break");
    force_break = 0;

    // 5: abort (FIFO clear) in the middle of the preamble
    got = {};
    @(posedge busy);
    repeat (100) @(posedge clk);
    @(negedge clk); abort_frame = 1; fifo_q = {};
    @(negedge clk); abort_frame = 0;
    check(!busy, "abort stops the frame");
    repeat (100) @(posedge clk);
    check(ir_txd == 0, "line at break after abort");
    enable = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
