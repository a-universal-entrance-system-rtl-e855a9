// sir_clock_gen: SIR clock generator (clock domain 2).
//
// Runs on the 115200*16 Hz SIR clock and produces `tick16`, a one-cycle
// enable at 16 times the selected bit rate, by dividing by 12, 6, 3, 2 or 1
// for BRCR = 0 (9600), 1 (19200), 2 (38400), 3 (57600), 4 (115200); any other
// BRCR value selects 9600 as the register table states. The divisor is taken
// from the document's BRCR table and clock frequency; the counter form is this
// design's. `brcr` must be stable in this clock domain (it is synchronised by
// the SIR controller). When `enable` is low the divider restarts.
module sir_clock_gen (
  input  logic       sir_clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [7:0] brcr,
  output logic       tick16
);
  import irphy_pkg::*;

  logic [3:0] div, cnt;
  assign div = sir_divisor(brcr);

  always_ff @(posedge sir_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      tick16 <= 1'b0;
    end else if (!enable) begin
      cnt    <= '0;
      tick16 <= 1'b0;
    end else if (cnt >= div - 1'b1) begin
      cnt    <= '0;
      tick16 <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      tick16 <= 1'b0;
    end
  end
endmodule
