// sir_rx_tb: self-checking test of the SIR receiver.
// The testbench writes RZI waveforms itself: each 0 bit of a UART frame is a
// light pulse, either 3/16 of the bit time at the start of the cell or the
// 1.63 us minimum-width pulse in the middle of the cell, at 9600, 57600 and
// 115200 b/s. Received bytes must match; a frame whose stop bit is 0 must be
// dropped and flagged; a disabled receiver must ignore its input.
`timescale 1ns/1ps
module sir_rx_tb;
  logic sir_clk = 0, rst_n = 1, enable = 0, tick16 = 0, ir_rxd = 0;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic fifo_push, frame_err, busy;
  logic [7:0] fifo_data;
  byte unsigned got[$];
  int n_ferr = 0;
  int checks = 0, failures = 0;
  int div = 12;

  sir_rx dut (.*);

  always #271.267 sir_clk = ~sir_clk;

  int tc = 0;
  always @(posedge sir_clk) begin
    tc <= (tc + 1 >= div) ? 0 : tc + 1;
    tick16 <= (tc + 1 >= div);
    if (fifo_push) got.push_back(fifo_data);
    if (frame_err) n_ferr++;
  end

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one UART frame as RZI; bit time from the baud rate
  task automatic send_frame(input real baud, input bit [9:0] fr, input bit centred);
    real bt = 1.0e9 / baud;
    real pw = centred ? 1630.0 : bt * 3.0 / 16.0;
    for (int b = 0; b < 10; b++) begin
      if (!fr[b]) begin
        if (centred) begin
          #((bt - pw) / 2.0); ir_rxd = 1; #(pw); ir_rxd = 0; #((bt - pw) / 2.0);
        end else begin
          ir_rxd = 1; #(pw); ir_rxd = 0; #(bt - pw);
        end
      end else #(bt);
    end
  endtask

  task automatic run(input int d, input real baud, input bit centred, input byte unsigned bytes[]);
    div = d; got = {};
    #(50000);
    foreach (bytes[i]) send_frame(baud, {1'b1, bytes[i], 1'b0}, centred);
    #(3.0e9 / baud);
    check(got.size() == bytes.size(), $sformatf("%0.0f b/s: %0d bytes, expected %0d", baud, got.size(), bytes.size()));
    foreach (bytes[i]) if (i < got.size())
      check(got[i] == bytes[i], $sformatf("%0.0f b/s byte %0d: %02h exp %02h", baud, i, got[i], bytes[i]));
  endtask

  initial begin
    int f0;
    #1000;
    rst_n = 1;
    enable = 1;
    run(12, 9600.0,   0, '{8'h55, 8'h00, 8'hFF, 8'hC1});
    run(2,  57600.0,  1, '{8'h12, 8'hED, 8'h80});
    run(1,  115200.0, 0, '{8'hA5, 8'h01, 8'hFE, 8'h7E, 8'h3C});
    run(1,  115200.0, 1, '{8'h96});
    // framing error: stop bit 0
    div = 1; got = {}; f0 = n_ferr;
    #50000;
    send_frame(115200.0, {1'b0, 8'h42, 1'b0}, 0);
    #(30000);
    check(got.size() == 0, "frame with bad stop bit dropped");
    check(n_ferr - f0 == 1, "framing error flagged");
    // recovery
    #50000;
    run(1, 115200.0, 0, '{8'h5C});
    // disabled
    enable = 0; got = {};
    send_frame(115200.0, {1'b1, 8'h00, 1'b0}, 0);
    #30000;
    check(got.size() == 0, "disabled receiver ignores input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
