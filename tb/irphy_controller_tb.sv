// irphy_controller_tb: MCR access and reset value, address routing to the
// SIR or FIR register set by MCR[4:3], the mode-switch rule (engines idle
// while MCR[0] is set, mode frozen when it is cleared), engine enables for
// every mode, and routing of interrupts and DMA requests.
`timescale 1ns/1ps
module irphy_controller_tb;
  import irphy_pkg::*;
  logic clk = 0, rst_n = 1, wr = 0, rd = 0;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic sir_sel, fir_sel;
  logic [7:0] sir_rdata = 8'h5A, fir_rdata = 8'hA5;
  logic sir_irq = 0, fir_irq = 0, fir_dreq_rx = 0, fir_dreq_tx = 0;
  logic irq, dreq_rx, dreq_tx, act_tx, switching;
  speed_e act_speed;
  logic sir_tx_en, sir_rx_en, fir_en, fir_tx_en, fir_rx_en;
  int checks = 0, failures = 0;

  irphy_controller dut (.*);
  always #15.625 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_mcr(input logic [7:0] v);
    @(negedge clk); addr = A_MCR; wdata = v; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic set_mode(input logic [1:0] speed, input logic tx);
    write_mcr({3'b000, speed, 1'b0, tx, 1'b1});   // switch
    write_mcr({3'b000, speed, 1'b0, tx, 1'b0});   // run
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); addr = A_MCR; #1;
    check(rdata == 8'h00, "MCR reset value 00h");
    check(sir_rx_en && !sir_tx_en && !fir_en, "after reset: SIR receive");
    // register routing
    write_mcr(8'h08);
    @(negedge clk); addr = 4'h3; #1;
    check(fir_sel && !sir_sel && rdata == 8'hA5, "FIR registers when MCR[4:3]=01");
    write_mcr(8'h00);
    @(negedge clk); addr = 4'h1; #1;
    check(sir_sel && !fir_sel && rdata == 8'h5A, "SIR registers when MCR[4:3]=00");
    write_mcr(8'h10);
    @(negedge clk); addr = 4'h1; #1;
    check(!sir_sel && !fir_sel && rdata == 8'h00, "no register set for MCR[4:3]=10");
    @(negedge clk); addr = A_MCR; #1;
    check(rdata == 8'h10, "MCR read back");
    // mode switch: nothing runs while MCR[0] = 1, mode frozen after
    write_mcr(8'h0B);       // FIR, transmit, switching
    #1;
    check(switching && !fir_en && !sir_tx_en && !sir_rx_en, "all idle during mode switch");
    write_mcr(8'h0A);
    #1;
    check(fir_tx_en && !fir_rx_en && act_speed == SPEED_FIR && act_tx, "FIR transmit after switch");
    write_mcr(8'h00);       // changed without the switch bit: mode frozen
    #1;
    check(fir_tx_en && act_speed == SPEED_FIR, "mode frozen without switch bit");
    set_mode(2'b01, 1'b0);
    check(fir_rx_en && !fir_tx_en, "FIR receive");
    fir_irq = 1; fir_dreq_rx = 1; fir_dreq_tx = 1; sir_irq = 0; #1;
    check(irq && dreq_rx && dreq_tx, "FIR interrupt and DMA routed");
    set_mode(2'b00, 1'b1);
    check(sir_tx_en && !sir_rx_en && !fir_en, "SIR transmit");
    #1;
    check(!irq && !dreq_rx && !dreq_tx, "FIR interrupt and DMA masked in SIR mode");
    sir_irq = 1; #1;
    check(irq, "SIR interrupt routed");
    set_mode(2'b00, 1'b0);
    check(sir_rx_en && !sir_tx_en, "SIR receive");
    set_mode(2'b10, 1'b1);
    check(!sir_tx_en && !sir_rx_en && !fir_en && !irq, "speed group 10: no engine");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
