// irphy_controller: IrPHY Controller of the Control Layer (clock domain 1).
//
// Holds the Master Control Register (address 0, reset 00h):
//   [0] mode switch, [1] direction (0 receive, 1 transmit),
//   [4:3] speed group (00 SIR, 01 FIR, 10 "IR transmit mode", 11 reserved).
// Register requests from the host interface are decoded here: address 0 is
// the MCR; every other address goes to the SIR controller when MCR[4:3] = 00
// and to the FIR controller when MCR[4:3] = 01 (`sir_sel`, `fir_sel`), and
// the read data comes back from the selected side.
// Mode switching: while MCR[0] is 1 the active mode (`act_speed`,
// `act_tx`) follows MCR[4:3] and MCR[1], and every transmitter and receiver
// is held idle; when software clears MCR[0] the mode is frozen and the
// engine of that mode and direction is enabled. Only one engine runs at a
// time (the link is half duplex). `irq` and the DMA requests come from the
// active speed group; SIR has no DMA requests.
// The MCR layout and the address map are the document's; holding the engines
// idle during a mode switch, and treating speed groups 10 and 11 as "no
// engine", are this design's reading of the MCR description.
module irphy_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic       rd,
  input  logic [3:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       sir_sel,
  output logic       fir_sel,
  input  logic [7:0] sir_rdata,
  input  logic [7:0] fir_rdata,
  input  logic       sir_irq,
  input  logic       fir_irq,
  input  logic       fir_dreq_rx,
  input  logic       fir_dreq_tx,
  output logic       irq,
  output logic       dreq_rx,
  output logic       dreq_tx,
  output irphy_pkg::speed_e act_speed,
  output logic       act_tx,
  output logic       switching,
  output logic       sir_tx_en,
  output logic       sir_rx_en,
  output logic       fir_en,
  output logic       fir_tx_en,
  output logic       fir_rx_en
);
  import irphy_pkg::*;

  mcr_t mcr;
  logic is_mcr;

  assign is_mcr  = (addr == A_MCR);
  assign sir_sel = !is_mcr && mcr.speed == SPEED_SIR;
  assign fir_sel = !is_mcr && mcr.speed == SPEED_FIR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcr       <= '0;
      act_speed <= SPEED_SIR;
      act_tx    <= 1'b0;
    end else begin
      if (wr && is_mcr) mcr <= mcr_t'(wdata);
      if (mcr.mode_switch) begin
        act_speed <= mcr.speed;
        act_tx    <= mcr.tx_mode;
      end
    end
  end

  assign switching = mcr.mode_switch;
  assign sir_tx_en = !switching && act_speed == SPEED_SIR && act_tx;
  assign sir_rx_en = !switching && act_speed == SPEED_SIR && !act_tx;
  assign fir_en    = !switching && act_speed == SPEED_FIR;
  assign fir_tx_en = fir_en && act_tx;
  assign fir_rx_en = fir_en && !act_tx;

  always_comb begin
    if (is_mcr)       rdata = mcr;
    else if (sir_sel) rdata = sir_rdata;
    else if (fir_sel) rdata = fir_rdata;
    else              rdata = 8'h00;
  end

  assign irq     = (act_speed == SPEED_SIR) ? sir_irq :
                   (act_speed == SPEED_FIR) ? fir_irq : 1'b0;
  assign dreq_rx = (act_speed == SPEED_FIR) && fir_dreq_rx;
  assign dreq_tx = (act_speed == SPEED_FIR) && fir_dreq_tx;

  // rd is used by the selected controller; here only for the assertion
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(wr && rd));
endmodule
