// crc32_tb: checks the bit-serial CRC32 against a byte-wise reference.
// For several messages (the standard "123456789" check string and random
// ones) it feeds the payload LSB first, then shifts out the FCS in fcs_mode
// and compares the 32 FCS bits with the reference CRC sent LSB first. A
// second instance receives payload + FCS and must show the 0xC704DD7B
// residue; a corrupted FCS must not. Also checks bad_fcs and clr.
`timescale 1ns/1ps
module crc32_tb;
  import irphy_tb_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic clr, en, din, fcs_mode, bad_fcs, dout;
  logic [31:0] crc;
  logic ok;
  logic clr2, en2, din2, dout2_unused;
  logic [31:0] crc2_unused;
  logic ok2;
  int checks = 0, failures = 0;

  crc32 dut (.clk, .rst_n, .clr, .en, .din, .fcs_mode, .bad_fcs, .dout, .crc, .residue_ok(ok));
  crc32 chk (.clk, .rst_n, .clr(clr2), .en(en2), .din(din2), .fcs_mode(1'b0), .bad_fcs(1'b0),
             .dout(dout2_unused), .crc(crc2_unused), .residue_ok(ok2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_msg(bytes_t m, bit corrupt);
    bit [31:0] ref_fcs = crc32_ref(m);
    bit [31:0] got;
    @(negedge clk); clr = 1; clr2 = 1; en = 0; en2 = 0;
    @(negedge clk); clr = 0; clr2 = 0;
    foreach (m[i]) for (int k = 0; k < 8; k++) begin
      en = 1; fcs_mode = 0; din = m[i][k]; en2 = 1; din2 = m[i][k];
      @(negedge clk);
    end
    for (int k = 0; k < 32; k++) begin
      en = 1; fcs_mode = 1; din = 0;
      #1 got[k] = dout;
      en2 = 1; din2 = dout ^ (corrupt && k == 5);
      @(negedge clk);
    end
    en = 0; en2 = 0; fcs_mode = 0;
    check(got == ref_fcs, $sformatf("FCS %08h expected %08h", got, ref_fcs));
    check(ok2 == !corrupt, $sformatf("residue flag %0b corrupt=%0b", ok2, corrupt));
  endtask

  initial begin
    bytes_t m;
    clr = 0; en = 0; din = 0; fcs_mode = 0; bad_fcs = 0; clr2 = 0; en2 = 0; din2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(crc == 32'hFFFF_FFFF, "preset after reset");
    m = {8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check(crc32_ref(m) == 32'hCBF4_3926, "reference model check value");
    run_msg(m, 0);
    run_msg(m, 1);
    for (int t = 0; t < 20; t++) begin
      m = {};
      repeat (1 + $urandom_range(0, 40)) m.push_back(8'($urandom));
      run_msg(m, t % 3 == 0);
    end
    // bad_fcs inverts the output in fcs_mode, passes data otherwise
    @(negedge clk); fcs_mode = 1; bad_fcs = 1; #1;
    check(dout == crc[31], "bad_fcs inverts FCS bit");
    fcs_mode = 0; din = 1; #1;
    check(dout == 1'b1, "data passes in data mode");
    bad_fcs = 0;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check(crc == 32'hFFFF_FFFF, "clr presets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
