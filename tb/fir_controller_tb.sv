// fir_controller_tb: FIR registers, FIFOs and interrupt system.
// Register requests are driven directly; the transmitter and receiver sides
// are driven by the testbench. Checks reset values (FCR = 33h), register
// read back, TX FIFO data to the transmitter side and the TX-low level for
// every FCR[5:4] code, RX FIFO data and the trigger level for every
// FCR[1:0] code, end of frame (IIR[1]) set at eof and cleared when the FIFO
// drains, IFDLR, clear-on-read of IIR[2], [3], [4], [6], receiver overrun
// overwriting the last byte, interrupt pulses only for enabled bits, DMA
// requests, busy, FIFO clears and the chip enable rate (one clock in four).
`timescale 1ns/1ps
module fir_controller_tb;
  import irphy_pkg::*;
  logic clk = 0, rst_n = 1, enable = 0, sel = 1, wr = 0, rd = 0;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic irq, dreq_rx, dreq_tx, chip_en;
  logic txf_empty, txf_pop = 0, force_break, count_mode, eof_mode, tx_abort;
  logic [7:0] txf_data;
  logic [15:0] ofdl;
  logic tx_underrun = 0, tx_busy = 0;
  logic rxf_push = 0, rx_eof = 0, rx_crc_err = 0, rx_err = 0, rx_busy = 0;
  logic [7:0] rxf_data = 0;
  logic [15:0] rx_len = 0;
  int checks = 0, failures = 0, n_irq = 0;

  fir_controller #(.DEPTH(16)) dut (.*);
  always #15.625 clk = ~clk;
  always @(posedge clk) if (irq) n_irq++;

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
  task automatic reg_write(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask
  task automatic reg_read(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk); addr = a; rd = 1; #1 d = rdata;
    @(negedge clk); rd = 0;
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask
  task automatic rx_byte(input logic [7:0] b);
    @(negedge clk); rxf_data = b; rxf_push = 1;
    @(negedge clk); rxf_push = 0;
  endtask
  function automatic logic [7:0] peek_iir();
    return dut.iir;
  endfunction

  initial begin
    logic [7:0] d;
    int i0, n;
    byte unsigned v[$];
    #100; rst_n = 1;
    reg_read(A_FIR_FCR, d); check(d == 8'h33, $sformatf("FCR reset %02h", d));
    reg_read(A_FIR_IER, d); check(d == 8'h00, "IER reset");
    reg_read(A_FIR_LCR, d); check(d == 8'h00, "LCR reset");
    reg_read(A_FIR_IIR, d); check(d == 8'h20, $sformatf("IIR after reset %02h (TX low only)", d));
    // read back
    reg_write(A_FIR_IER, 8'h7F);  reg_read(A_FIR_IER, d); check(d == 8'h7F, "IER");
    reg_write(A_FIR_IER, 8'h00);
    reg_write(A_FIR_LCR, 8'h03);  check(force_break && count_mode, "LCR bits");
    reg_write(A_FIR_LCR, 8'h00);
    reg_write(A_FIR_OFDLR0, 8'h34); reg_write(A_FIR_OFDLR1, 8'h12);
    check(ofdl == 16'h1234, "OFDLR");
    reg_read(A_FIR_OFDLR1, d); check(d == 8'h12, "OFDLR1 read");
    // TX FIFO and low level for each FCR[5:4]
    for (int lv = 0; lv < 4; lv++) begin
      reg_write(A_FIR_FCR, 8'h40);                  // clear TX FIFO
      reg_write(A_FIR_FCR, 8'(lv << 4));
      for (int k = 0; k < 10; k++) begin
        check(peek_iir()[IIR_TX_LOW] == (k <= 2 + 2 * lv), $sformatf("TX low level %0d with %0d bytes", 2 + 2 * lv, k));
        check(dreq_tx == (k <= 2 + 2 * lv), "TX DMA request");
        reg_write(A_FIR_TXF, 8'(k + 16 * lv));
      end
    end
    check(!eof_mode, "eof_mode clear");
    reg_write(A_FIR_FCR, 8'h80);
    check(eof_mode, "FCR[7] end of frame");
    check(txf_data == 8'h30, "TX FIFO head to transmitter");
    pulse(txf_pop);
    check(txf_data == 8'h31, "TX FIFO pop");
    i0 = n_irq;
    reg_write(A_FIR_FCR, 8'h40);
    check(txf_empty, "FCR[6] clears TX FIFO");
    // RX trigger levels
    for (int lv = 0; lv < 4; lv++) begin
      reg_write(A_FIR_FCR, 8'(lv | 8'h04));          // level + clear RX FIFO
      for (int k = 0; k < 16; k++) begin
        rx_byte(8'(k));
        check(peek_iir()[IIR_RX_TRIG] == (k + 1 >= 8 + 2 * lv), $sformatf("RX trigger %0d with %0d bytes", 8 + 2 * lv, k + 1));
        check(dreq_rx == (k + 1 >= 8 + 2 * lv), "RX DMA request");
      end
    end
    // overrun: FIFO full, next byte overwrites the last one
    rx_byte(8'hEE);
    reg_read(A_FIR_IIR, d);
    check(d[IIR_RX_OVR], "overrun flagged");
    reg_read(A_FIR_IIR, d);
    check(!d[IIR_RX_OVR], "overrun cleared by reading IIR");
    for (int k = 0; k < 16; k++) begin
      reg_read(A_FIR_RXF, d);
      check(d == ((k == 15) ? 8'hEE : 8'(k)), $sformatf("RX byte %0d = %02h", k, d));
    end
    // end of frame: set at eof, cleared when the FIFO drains; IFDLR
    rx_byte(8'hA1); rx_byte(8'hA2);
    rx_len = 16'h0102;
    pulse(rx_eof);
    reg_read(A_FIR_IFDLR0, d); check(d == 8'h02, "IFDLR0");
    reg_read(A_FIR_IFDLR1, d); check(d == 8'h01, "IFDLR1");
    check(peek_iir()[IIR_RX_EOF], "end of frame set");
    reg_read(A_FIR_RXF, d);
    check(peek_iir()[IIR_RX_EOF], "end of frame held while data remains");
    reg_read(A_FIR_RXF, d);
    check(!peek_iir()[IIR_RX_EOF], "end of frame cleared when FIFO drained");
    // clear-on-read bits
    pulse(rx_crc_err); pulse(rx_err); pulse(tx_underrun);
    reg_read(A_FIR_IIR, d);
    check(d[IIR_CRC_ERR] && d[IIR_RX_ERR] && d[IIR_TX_UNDR], $sformatf("sticky bits %02h", d));
    reg_read(A_FIR_IIR, d);
    check(!d[IIR_CRC_ERR] && !d[IIR_RX_ERR] && !d[IIR_TX_UNDR], "sticky bits cleared by read");
    // busy
    tx_busy = 1; #1; check(peek_iir()[IIR_BUSY], "busy from transmitter");
    tx_busy = 0; rx_busy = 1; #1; check(peek_iir()[IIR_BUSY], "busy from receiver");
    rx_busy = 0;
    // interrupts only when enabled, one pulse per rising edge
    i0 = n_irq;
    pulse(rx_crc_err);
    repeat (3) @(negedge clk);
    check(n_irq == i0, "no interrupt when disabled");
    reg_read(A_FIR_IIR, d);
    reg_write(A_FIR_IER, 8'h04);
    i0 = n_irq;
    pulse(rx_crc_err);
    repeat (3) @(negedge clk);
    check(n_irq - i0 == 1, "one interrupt for CRC error");
    pulse(rx_crc_err);
    repeat (3) @(negedge clk);
    check(n_irq - i0 == 1, "no new interrupt while the bit stays set");
    reg_read(A_FIR_IIR, d);
    reg_write(A_FIR_IER, 8'h40);
    i0 = n_irq;
    pulse(tx_underrun);
    repeat (3) @(negedge clk);
    check(n_irq - i0 == 1, "underrun interrupt");
    check(tx_abort == 0, "no abort without FCR[6]");
    // chip enable: one clock in four while enabled
    enable = 1; n = 0;
    repeat (400) begin @(posedge clk); #1 n += chip_en; end
    check(n == 100, $sformatf("%0d chip enables in 400 clocks", n));
    enable = 0; n = 0;
    repeat (40) begin @(posedge clk); #1 n += chip_en; end
    check(n == 0, "no chip enable when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
