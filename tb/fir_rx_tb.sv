// fir_rx_tb: self-checking test of the 4 Mb/s receiver.
// Frames are built by the reference frame builder and driven chip by chip
// with a chip period slightly off the nominal 125 ns and a phase unrelated
// to the 32 MHz clock, so the bit synchroniser has to track. Checked:
// received bytes and frame length for good frames of several sizes (the FCS
// must not reach the FIFO), CRC error on a corrupted FCS, receiver error on
// an illegal 4PPM symbol and on a wrong flag after the preamble, recovery for
// the next frame, and the 4 Mb/s rate (one byte per 2 us).
`timescale 1ns/1ps
module fir_rx_tb;
  import irphy_tb_pkg::*;

  logic clk = 0, rst_n = 1, enable = 0, ir_rxd = 0;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic fifo_push, eof, crc_err, rx_err, busy;
  logic [7:0] fifo_data;
  logic [15:0] frame_len;
  int checks = 0, failures = 0;
  int n_eof = 0, n_crc = 0, n_err = 0;
  byte unsigned rxq[$];
  realtime push_t[$];

  fir_rx dut (.*);

  always #15.625 clk = ~clk;

  always @(posedge clk) begin
    if (fifo_push) begin rxq.push_back(fifo_data); push_t.push_back($realtime); end
    if (eof) n_eof++;
    if (crc_err) n_crc++;
    if (rx_err) n_err++;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime chip_t = 125.2;
  task automatic send(chips_t q);
    foreach (q[i]) begin ir_rxd = q[i]; #(chip_t); end
    ir_rxd = 0;
    #(chip_t * 40);
  endtask

  task automatic good_frame(bytes_t d);
    int e0 = n_eof, c0 = n_crc, r0 = n_err;
    rxq = {}; push_t = {};
    send(fir_frame(d, 0));
    check(n_eof - e0 == 1, $sformatf("eof for %0d-byte frame", d.size()));
    check(n_crc == c0 && n_err == r0, $sformatf("no error for %0d-byte frame", d.size()));
    check(frame_len == 16'(d.size()), $sformatf("frame_len %0d expected %0d", frame_len, d.size()));
    check(rxq == d, $sformatf("payload of %0d-byte frame", d.size()));
  endtask

  initial begin
    bytes_t d;
    chips_t q;
    int e0, c0, r0;
    #(100.3);
    rst_n = 1;
    #(200);
    enable = 1;
    #(317.7);

    good_frame({8'h5A});
    d = {};
    for (int i = 0; i < 24; i++) d.push_back(8'($urandom));
    good_frame(d);
    // rate: consecutive bytes 16 chips apart (2 us at 4 Mb/s)
    check(push_t.size() == 24 && (push_t[23] - push_t[1]) / 22.0 > 1990.0 &&
          (push_t[23] - push_t[1]) / 22.0 < 2015.0, "one byte per 2 us");
    chip_t = 124.8;
    good_frame({8'h00, 8'hFF, 8'h7E, 8'hC0, 8'h11, 8'h22});

    // corrupted FCS -> CRC error, frame still ends
    e0 = n_eof; c0 = n_crc;
    d = {8'h10, 8'h20, 8'h30};
    rxq = {};
    send(fir_frame(d, 1));
    check(n_crc - c0 == 1, "CRC error reported");
    check(n_eof - e0 == 1, "frame with CRC error still ends at STO");
    check(rxq == d, "payload delivered with bad CRC");

    // illegal 4PPM symbol in the payload -> receiver error, no eof
    e0 = n_eof; r0 = n_err;
    q = fir_frame({8'hAB, 8'hCD, 8'hEF}, 0);
    for (int i = 0; i < 4; i++) q[16*16 + 32 + 16 + i] = (i < 2);   // symbol 1100
    send(q);
    check(n_err - r0 == 1, "illegal symbol reported");
    check(n_eof == e0, "no eof for broken frame");

    // wrong flag after the preamble -> receiver error
    r0 = n_err;
    q = {};
    for (int r = 0; r < 16; r++) add_pattern(q, "1000000010101000");
    add_pattern(q, "0100 0100 0100 0100 0100 0100 0100 0100");
    send(q);
    check(n_err - r0 == 1, "wrong flag reported");

    // receiver recovers
    good_frame({8'hDE, 8'hAD, 8'hBE, 8'hEF});

    // disabled receiver ignores a frame
    enable = 0;
    e0 = n_eof; rxq = {};
    send(fir_frame({8'h01}, 0));
    check(n_eof == e0 && rxq.size() == 0, "disabled receiver ignores input");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
