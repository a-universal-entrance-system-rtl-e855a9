// irphy_top: IrGate-IrPHY, an IrDA physical layer core for an embedded host.
//
// The core sits between the SNDS100 host bus and an IrDA optical transceiver
// and implements two of the IrDA physical layers: SIR (9.6 to 115.2 kb/s,
// UART frames sent as 3/16-bit-time pulses) and FIR (4 Mb/s, 4PPM with PA,
// STA and STO flags and a CRC32 frame check). MIR and 2.4 kb/s are not
// implemented. Layers:
//   Interface Layer   host_interface
//   Control Layer     irphy_controller (MCR, decode), sir_controller,
//                     fir_controller
//   Transfer/Receive  sir_tx, sir_rx, fir_tx, fir_rx
//   I/O Layer         output_mux
// Clock domain 1 (`clk`, 32 MHz) covers the host interface and all FIR logic;
// clock domain 2 (`sir_clk`, 115200*16 = 1.8432 MHz) covers the SIR
// registers' clock generator, SIR TX and SIR RX. The SIR FIFOs are the
// crossing between them. `rst_n` is asynchronous; each domain releases it
// through its own synchroniser.
// Host view: 16 byte registers selected by `bus_addr`, see irphy_controller,
// sir_controller and fir_controller. `irq` is a one-cycle pulse (32 MHz);
// `dreq_rx`/`dreq_tx` are level DMA requests in FIR mode.
// `ir_txd`/`ir_rxd` use 1 for "light on".
// The layer structure, clock domains and register map follow the document;
// the host strobe protocol, FIFO crossing and reset scheme are this design's.
module irphy_top #(
  parameter int unsigned FIR_FIFO_DEPTH = 16,
  parameter int unsigned SIR_FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       sir_clk,
  input  logic       rst_n,
  input  logic       bus_ncs,
  input  logic       bus_nwe,
  input  logic       bus_noe,
  input  logic [3:0] bus_addr,
  input  logic [7:0] bus_wdata,
  output logic [7:0] bus_rdata,
  output logic       irq,
  output logic       dreq_rx,
  output logic       dreq_tx,
  input  logic       ir_rxd,
  output logic       ir_txd
);
  import irphy_pkg::*;

  logic rst1_n, rst2_n;
  reset_sync u_rs1 (.clk(clk),     .rst_in_n(rst_n), .rst_out_n(rst1_n));
  reset_sync u_rs2 (.clk(sir_clk), .rst_in_n(rst_n), .rst_out_n(rst2_n));

  // ---------------- Interface Layer ----------------
  logic       reg_wr, reg_rd;
  logic [3:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;

  host_interface u_host (
    .clk(clk), .rst_n(rst1_n), .bus_ncs(bus_ncs), .bus_nwe(bus_nwe), .bus_noe(bus_noe),
    .bus_addr(bus_addr), .bus_wdata(bus_wdata), .bus_rdata(bus_rdata),
    .reg_wr(reg_wr), .reg_rd(reg_rd), .reg_addr(reg_addr), .reg_wdata(reg_wdata),
    .reg_rdata(reg_rdata));

  // ---------------- Control Layer ----------------
  logic       sir_sel, fir_sel, switching, act_tx;
  speed_e     act_speed;
  logic [7:0] sir_rdata, fir_rdata;
  logic       sir_irq, fir_irq, fir_dreq_rx, fir_dreq_tx;
  logic       sir_tx_en, sir_rx_en, fir_en, fir_tx_en, fir_rx_en;

  irphy_controller u_ctrl (
    .clk(clk), .rst_n(rst1_n), .wr(reg_wr), .rd(reg_rd), .addr(reg_addr), .wdata(reg_wdata),
    .rdata(reg_rdata), .sir_sel(sir_sel), .fir_sel(fir_sel), .sir_rdata(sir_rdata),
    .fir_rdata(fir_rdata), .sir_irq(sir_irq), .fir_irq(fir_irq),
    .fir_dreq_rx(fir_dreq_rx), .fir_dreq_tx(fir_dreq_tx),
    .irq(irq), .dreq_rx(dreq_rx), .dreq_tx(dreq_tx),
    .act_speed(act_speed), .act_tx(act_tx), .switching(switching),
    .sir_tx_en(sir_tx_en), .sir_rx_en(sir_rx_en), .fir_en(fir_en),
    .fir_tx_en(fir_tx_en), .fir_rx_en(fir_rx_en));

  // SIR controller
  logic       tick16, sir_tx_en_s, sir_rx_en_s;
  logic       stxf_empty, stxf_pop, srxf_push;
  logic [7:0] stxf_data, srxf_data;
  logic       sir_tx_empty_unused, sir_rx_full_unused;

  sir_controller #(.DEPTH(SIR_FIFO_DEPTH)) u_sirc (
    .clk(clk), .rst_n(rst1_n), .sel(sir_sel), .wr(reg_wr), .rd(reg_rd), .addr(reg_addr),
    .wdata(reg_wdata), .rdata(sir_rdata), .tx_en(sir_tx_en), .rx_en(sir_rx_en),
    .irq(sir_irq), .tx_empty(sir_tx_empty_unused), .rx_full(sir_rx_full_unused),
    .sir_clk(sir_clk), .sir_rst_n(rst2_n), .tick16(tick16),
    .tx_en_s(sir_tx_en_s), .rx_en_s(sir_rx_en_s),
    .txf_empty_s(stxf_empty), .txf_data_s(stxf_data), .txf_pop_s(stxf_pop),
    .rxf_push_s(srxf_push), .rxf_data_s(srxf_data));

  // FIR controller
  logic        chip_en, ftxf_empty, ftxf_pop, force_break, count_mode, eof_mode, tx_abort;
  logic [7:0]  ftxf_data, frxf_data;
  logic [15:0] ofdl, rx_len;
  logic        tx_underrun, tx_busy, tx_done_unused;
  logic        frxf_push, rx_eof, rx_crc_err, rx_err, rx_busy;

  fir_controller #(.DEPTH(FIR_FIFO_DEPTH)) u_firc (
    .clk(clk), .rst_n(rst1_n), .enable(fir_en), .sel(fir_sel), .wr(reg_wr), .rd(reg_rd),
    .addr(reg_addr), .wdata(reg_wdata), .rdata(fir_rdata), .irq(fir_irq),
    .dreq_rx(fir_dreq_rx), .dreq_tx(fir_dreq_tx), .chip_en(chip_en),
    .txf_empty(ftxf_empty), .txf_data(ftxf_data), .txf_pop(ftxf_pop),
    .force_break(force_break), .count_mode(count_mode), .ofdl(ofdl), .eof_mode(eof_mode),
    .tx_abort(tx_abort), .tx_underrun(tx_underrun), .tx_busy(tx_busy),
    .rxf_push(frxf_push), .rxf_data(frxf_data), .rx_eof(rx_eof), .rx_len(rx_len),
    .rx_crc_err(rx_crc_err), .rx_err(rx_err), .rx_busy(rx_busy));

  // ---------------- Transfer / Receive Layer ----------------
  logic sir_txd, fir_txd, sir_rxd, fir_rxd;
  logic sir_tx_busy_unused, sir_rx_busy_unused, sir_ferr_unused;

  sir_tx u_sirtx (
    .sir_clk(sir_clk), .rst_n(rst2_n), .enable(sir_tx_en_s), .tick16(tick16),
    .fifo_empty(stxf_empty), .fifo_data(stxf_data), .fifo_pop(stxf_pop),
    .ir_txd(sir_txd), .busy(sir_tx_busy_unused));

  sir_rx u_sirrx (
    .sir_clk(sir_clk), .rst_n(rst2_n), .enable(sir_rx_en_s), .tick16(tick16),
    .ir_rxd(sir_rxd), .fifo_push(srxf_push), .fifo_data(srxf_data),
    .frame_err(sir_ferr_unused), .busy(sir_rx_busy_unused));

  fir_tx u_firtx (
    .clk(clk), .rst_n(rst1_n), .enable(fir_tx_en), .chip_en(chip_en),
    .fifo_empty(ftxf_empty), .fifo_data(ftxf_data), .fifo_pop(ftxf_pop),
    .force_break(force_break), .count_mode(count_mode), .ofdl(ofdl), .eof_mode(eof_mode),
    .abort_frame(tx_abort), .ir_txd(fir_txd), .busy(tx_busy), .underrun(tx_underrun),
    .frame_done(tx_done_unused));

  fir_rx u_firrx (
    .clk(clk), .rst_n(rst1_n), .enable(fir_rx_en), .ir_rxd(fir_rxd),
    .fifo_push(frxf_push), .fifo_data(frxf_data), .eof(rx_eof), .frame_len(rx_len),
    .crc_err(rx_crc_err), .rx_err(rx_err), .busy(rx_busy));

  // ---------------- I/O Layer ----------------
  output_mux u_mux (
    .act_speed(act_speed), .act_tx(act_tx), .switching(switching),
    .sir_txd(sir_txd), .fir_txd(fir_txd), .ir_txd(ir_txd),
    .ir_rxd(ir_rxd), .sir_rxd(sir_rxd), .fir_rxd(fir_rxd));
endmodule
