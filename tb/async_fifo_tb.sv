// async_fifo_tb: dual-clock FIFO test with unrelated write (32 MHz) and read
// (1.8432 MHz) clocks, both directions of rate mismatch. Every byte written
// must come out once and in order; the FIFO must fill to all 16 entries
// with `wfull` exactly at 16; no write is accepted while full; the
// read-side flush must discard what was written before it.
`timescale 1ns/1ps
module async_fifo_tb;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  initial begin #1 wrst_n = 0; rrst_n = 0; end  // falling edge for the async resets
  logic push = 0, pop = 0, rflush = 0;
  logic [7:0] wdata = 0, rdata;
  logic wfull, rempty;
  logic [4:0] wcount, rcount;
  int checks = 0, failures = 0;
  byte unsigned sent[$], got[$];
  bit fast_read = 0;

  async_fifo #(.DEPTH(16), .WIDTH(8)) dut (.*);

  always #15.625 wclk = ~wclk;
  always #271.267 rclk = ~rclk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // writer: random bursts
  int nwrite = 0, n_full = 0;
  always @(posedge wclk) if (wrst_n) begin
    if (push && !wfull) begin sent.push_back(wdata); nwrite++; end
    check(wcount <= 16, "write count in range");
    check(wfull == (wcount == 16), "full flag matches the write count");
    if (wcount == 16) n_full++;
  end
  always @(negedge wclk) begin
    push  <= (nwrite < 300) && ($urandom_range(0, 99) < (fast_read ? 3 : 60));
    wdata <= 8'($urandom);
  end
  // reader
  always @(posedge rclk) if (rrst_n && pop && !rempty) got.push_back(rdata);
  always @(negedge rclk) pop <= !rflush && ($urandom_range(0, 99) < 70);

  initial begin
    #100;
    wrst_n = 1; rrst_n = 1;
    wait (nwrite >= 150);
    fast_read = 1;
    wait (nwrite >= 300);
    #200us;
    check(got.size() == sent.size(), $sformatf("%0d read, %0d written", got.size(), sent.size()));
    check(got == sent, "data in order");
    check(n_full > 0, "FIFO filled to 16 entries");
    // flush: fill a few bytes, flush on the read side, nothing comes out
    got = {};
    @(negedge rclk); rflush = 1;   // hold the reader
    @(negedge wclk); push = 0;
    #5us;
    check(rempty, "empty before flush test");
    for (int i = 0; i < 5; i++) begin
      @(negedge wclk); force push = 1; wdata = 8'(i);
    end
    @(negedge wclk); release push;
    #10us;
    @(negedge rclk); rflush = 1;
    @(negedge rclk); rflush = 0;
    #10us;
    check(rempty && rcount == 0, "flush empties the FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
