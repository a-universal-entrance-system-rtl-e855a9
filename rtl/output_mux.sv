// output_mux: I/O Layer routing between the transceiver and the SIR and FIR
// modules.
//
// Transmit: `ir_txd` carries the SIR TX output when the active speed group is
// SIR and the core is in transmit mode, the FIR TX output when it is FIR, and
// 0 (no light) otherwise, including during a mode switch.
// Receive: the transceiver output is passed to the receiver of the active
// speed group only in receive mode; the other receiver sees an idle line.
// Purely combinational. The multiplexer and the routing of the received
// signal to both receivers are in the document's block diagram; gating the
// inactive receiver is this design's choice.
module output_mux (
  input  irphy_pkg::speed_e act_speed,
  input  logic act_tx,
  input  logic switching,
  input  logic sir_txd,
  input  logic fir_txd,
  output logic ir_txd,
  input  logic ir_rxd,
  output logic sir_rxd,
  output logic fir_rxd
);
  import irphy_pkg::*;

  logic run;
  assign run = !switching;

  always_comb begin
    ir_txd = 1'b0;
    if (run && act_tx) begin
      unique case (act_speed)
        SPEED_SIR: ir_txd = sir_txd;
        SPEED_FIR: ir_txd = fir_txd;
        default:   ir_txd = 1'b0;
      endcase
    end
  end

  assign sir_rxd = ir_rxd && run && !act_tx && act_speed == SPEED_SIR;
  assign fir_rxd = ir_rxd && run && !act_tx && act_speed == SPEED_FIR;
endmodule
