// sir_controller_tb: SIR registers and FIFOs across the two clock domains.
// Host-side register requests on the 32 MHz clock; the SIR-side FIFO ports
// are driven on the 1.8432 MHz clock. Checks BRCR reset value and read back,
// the 16x tick rate BRCR selects, bytes written to TxFIFO arriving in order
// on the SIR side, bytes pushed on the SIR side read back from RxFIFO, the
// FCR clears of both FIFOs, the TX-empty and RX-full interrupt pulses and
// the enable synchronisation.
`timescale 1ns/1ps
module sir_controller_tb;
  import irphy_pkg::*;
  logic clk = 0, sir_clk = 0, rst_n = 1, sir_rst_n = 1;
  initial begin #1 rst_n = 0; sir_rst_n = 0; end  // falling edge for the async resets
  logic sel = 1, wr = 0, rd = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic tx_en = 0, rx_en = 0, irq, tx_empty, rx_full;
  logic tick16, tx_en_s, rx_en_s, txf_empty_s, txf_pop_s = 0, rxf_push_s = 0;
  logic [7:0] txf_data_s, rxf_data_s = 0;
  int checks = 0, failures = 0, n_irq = 0, n_tick = 0;

  sir_controller #(.DEPTH(16)) dut (.*);

  always #15.625 clk = ~clk;
  always #271.267 sir_clk = ~sir_clk;
  always @(posedge clk) if (irq) n_irq++;
  always @(posedge sir_clk) if (tick16) n_tick++;

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

  task automatic reg_write(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask
  task automatic reg_read(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk); addr = a; rd = 1; #1 d = rdata;
    @(negedge clk); rd = 0;
  endtask
  task automatic sir_pop(output logic [7:0] d);
    @(negedge sir_clk); d = txf_data_s; txf_pop_s = 1;
    @(negedge sir_clk); txf_pop_s = 0;
  endtask
  task automatic sir_push(input logic [7:0] d);
    @(negedge sir_clk); rxf_data_s = d; rxf_push_s = 1;
    @(negedge sir_clk); rxf_push_s = 0;
  endtask

  initial begin
    logic [7:0] d;
    byte unsigned v[$];
    int i0, t0;
    #100; rst_n = 1; sir_rst_n = 1;
    reg_read(A_SIR_BRCR, d);
    check(d == 8'h00, "BRCR reset 00h");
    reg_write(A_SIR_BRCR, 8'h04);
    reg_read(A_SIR_BRCR, d);
    check(d == 8'h04, "BRCR read back");
    // enables cross into the SIR domain; tick rate follows BRCR
    tx_en = 1;
    repeat (6) @(posedge sir_clk);
    check(tx_en_s && !rx_en_s, "tx enable synchronised");
    t0 = n_tick; repeat (120) @(posedge sir_clk);
    check(n_tick - t0 >= 119 && n_tick - t0 <= 120, $sformatf("115200: %0d ticks in 120 clocks", n_tick - t0));
    reg_write(A_SIR_BRCR, 8'h00);
    repeat (6) @(posedge sir_clk);
    t0 = n_tick; repeat (120) @(posedge sir_clk);
    check(n_tick - t0 == 10, $sformatf("9600: %0d ticks in 120 clocks", n_tick - t0));
    // TX path
    i0 = n_irq;
    for (int i = 0; i < 6; i++) begin v.push_back(8'($urandom)); reg_write(A_SIR_TXF, v[i]); end
    repeat (5) @(posedge sir_clk);
    check(!txf_empty_s, "TX data visible on SIR side");
    for (int i = 0; i < 6; i++) begin sir_pop(d); check(d == v[i], $sformatf("TX byte %0d", i)); end
    repeat (5) @(posedge sir_clk);
    repeat (10) @(posedge clk);
    check(txf_empty_s && tx_empty, "TX FIFO empty");
    check(n_irq - i0 == 1, "one interrupt when the TX FIFO runs empty");
    // TX clear from the host side
    for (int i = 0; i < 4; i++) reg_write(A_SIR_TXF, 8'(i));
    repeat (5) @(posedge sir_clk);
    reg_write(A_SIR_FCR, 8'h04);
    repeat (8) @(posedge sir_clk);
    check(txf_empty_s, "FCR[2] clears the TX FIFO");
    // RX path and full interrupt
    v = {};
    i0 = n_irq;
    for (int i = 0; i < 16; i++) begin v.push_back(8'($urandom)); sir_push(v[i]); end
    repeat (10) @(posedge clk);
    check(rx_full, "RX FIFO full");
    check(n_irq - i0 == 1, "one interrupt when the RX FIFO becomes full");
    for (int i = 0; i < 10; i++) begin reg_read(A_SIR_RXF, d); check(d == v[i], $sformatf("RX byte %0d", i)); end
    reg_write(A_SIR_FCR, 8'h02);
    reg_read(A_SIR_RXF, d);
    check(d == 8'h00 && !rx_full, "FCR[1] clears the RX FIFO");
    repeat (4) @(posedge sir_clk);   // write side sees the freed space
    sir_push(8'hC5);
    repeat (10) @(posedge clk);
    reg_read(A_SIR_RXF, d);
    check(d == 8'hC5, $sformatf("RX FIFO works after clear: %02h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
