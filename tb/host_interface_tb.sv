// host_interface_tb: drives asynchronous bus cycles (strobe timing unrelated
// to the 32 MHz clock) into the host interface with a register file model
// behind it. Each write must give exactly one reg_wr with the right address
// and data; each read exactly one reg_rd and the register value on
// bus_rdata, held after the strobe ends.
`timescale 1ns/1ps
module host_interface_tb;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic bus_ncs = 1, bus_nwe = 1, bus_noe = 1;
  logic [3:0] bus_addr = 0;
  logic [7:0] bus_wdata = 0, bus_rdata;
  logic reg_wr, reg_rd;
  logic [3:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;
  logic [7:0] regs [16];
  int n_wr = 0, n_rd = 0;
  int checks = 0, failures = 0;

  host_interface dut (.*);
  always #15.625 clk = ~clk;

  assign reg_rdata = regs[reg_addr] ^ 8'(n_rd);   // value changes after each read
  always @(posedge clk) begin
    if (reg_wr) begin regs[reg_addr] <= reg_wdata; n_wr <= n_wr + 1; end
    if (reg_rd) n_rd <= n_rd + 1;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [7:0] d);
    bus_addr = a; bus_wdata = d; #(7.3);
    bus_ncs = 0; bus_nwe = 0; #(190.0);
    bus_nwe = 1; bus_ncs = 1; #(60.0);
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [7:0] d);
    bus_addr = a; #(5.1);
    bus_ncs = 0; bus_noe = 0; #(190.0);
    d = bus_rdata;
    bus_noe = 1; bus_ncs = 1; #(60.0);
  endtask

  initial begin
    logic [7:0] d, e;
    int w0, r0;
    foreach (regs[i]) regs[i] = 0;
    #100; rst_n = 1; #100;
    for (int i = 0; i < 40; i++) begin
      logic [3:0] a = 4'($urandom);
      logic [7:0] v = 8'($urandom);
      w0 = n_wr;
      bus_write(a, v);
      check(n_wr - w0 == 1, "one write pulse per write cycle");
      check(regs[a] == v, $sformatf("write %h to %h", v, a));
      r0 = n_rd;
      e = regs[a] ^ 8'(n_rd);
      bus_read(a, d);
      check(n_rd - r0 == 1, "one read pulse per read cycle");
      check(d == e, $sformatf("read %h exp %h", d, e));
      #300;
      check(bus_rdata == e, "read data held after the cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
