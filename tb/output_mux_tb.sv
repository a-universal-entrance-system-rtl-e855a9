// output_mux_tb: exhaustive check of the I/O layer routing for every speed
// group, direction and mode-switch state against the expected table.
`timescale 1ns/1ps
module output_mux_tb;
  import irphy_pkg::*;
  speed_e act_speed;
  logic act_tx, switching, sir_txd, fir_txd, ir_txd, ir_rxd, sir_rxd, fir_rxd;
  int checks = 0, failures = 0;

  output_mux dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      bit exp_tx, exp_srx, exp_frx;
      {act_speed, act_tx, switching, sir_txd, fir_txd, ir_rxd} = 7'(v);
      #1;
      exp_tx  = !switching && act_tx && ((act_speed == SPEED_SIR && sir_txd) || (act_speed == SPEED_FIR && fir_txd));
      exp_srx = !switching && !act_tx && act_speed == SPEED_SIR && ir_rxd;
      exp_frx = !switching && !act_tx && act_speed == SPEED_FIR && ir_rxd;
      checks++;
      if (ir_txd !== exp_tx || sir_rxd !== exp_srx || fir_rxd !== exp_frx) begin
        failures++;
        $display("FAIL: input %b: tx %b/%b srx %b/%b frx %b/%b", v[6:0], ir_txd, exp_tx, sir_rxd, exp_srx, fir_rxd, exp_frx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
