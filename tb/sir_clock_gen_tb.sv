// sir_clock_gen_tb: counts 16x ticks of the SIR clock generator for every
// BRCR value and checks the period in SIR clocks (12, 6, 3, 2, 1 for 9600 ..
// 115200 b/s, 12 for undefined codes) and that a disabled divider is quiet.
`timescale 1ns/1ps
module sir_clock_gen_tb;
  logic sir_clk = 0, rst_n = 1, enable = 0, tick16;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic [7:0] brcr = 0;
  int checks = 0, failures = 0;

  sir_clock_gen dut (.*);
  always #271.267 sir_clk = ~sir_clk;

  initial begin
    repeat (100000) @(posedge sir_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int exp_div[8] = '{12, 6, 3, 2, 1, 12, 12, 12};
    int codes[8]   = '{0, 1, 2, 3, 4, 5, 9, 255};
    repeat (3) @(posedge sir_clk);
    rst_n = 1;
    for (int c = 0; c < 8; c++) begin
      int n;
      n = 0;
      @(negedge sir_clk); brcr = 8'(codes[c]); enable = 1;
      repeat (30) @(posedge sir_clk);
      for (int i = 0; i < 480; i++) begin @(posedge sir_clk); #1; n += tick16; end
      check(n == 480 / exp_div[c], $sformatf("BRCR %0d: %0d ticks in 480 clocks, expected %0d", codes[c], n, 480 / exp_div[c]));
      enable = 0;
    end
    begin
      int n;
      n = 0;
      for (int i = 0; i < 100; i++) begin @(posedge sir_clk); #1; n += tick16; end
      check(n == 0, "no ticks when disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
