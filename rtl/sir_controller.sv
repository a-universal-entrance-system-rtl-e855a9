// sir_controller: SIR registers, SIR FIFOs, SIR clock generator and SIR
// interrupt system.
//
// Host side (clock domain 1, `clk`): one-cycle register requests for the SIR
// address map, valid while `sel` is high (MCR[4:3] = 00):
//   1 BRCR  R/W  baud rate (0 9600, 1 19200, 2 38400, 3 57600, 4 115200,
//                others 9600), reset 00h
//   2 FCR   W    bit 1 clears the RX FIFO, bit 2 clears the TX FIFO (reads 0)
//   3 TxFIFO W   write a byte to send
//   4 RxFIFO R   read (and remove) the oldest received byte
// `rdata` is the combinational read value for `addr`; a read of RxFIFO pops
// on the `rd` cycle. The interrupt system gives a one-cycle `irq` pulse when
// the TX FIFO becomes empty or the RX FIFO becomes full (the two conditions
// the document lists); `tx_empty`/`rx_full` show the levels.
// SIR side (clock domain 2, `sir_clk`): the FIFO ports for the SIR TX and RX
// modules, the 16x bit-rate enable `tick16` and the enables `tx_en_s` /
// `rx_en_s`, which, like BRCR, are brought into this domain through two-flop
// synchronisers (BRCR must not change during a transfer).
// The register set, the clock generator inside the SIR registers and the two
// interrupt conditions follow the document; FIFO depth, the pulse form of
// the interrupt and the clock-domain crossing are this design's choices.
module sir_controller #(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel,
  input  logic       wr,
  input  logic       rd,
  input  logic [3:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic       tx_en,
  input  logic       rx_en,
  output logic       irq,
  output logic       tx_empty,
  output logic       rx_full,
  input  logic       sir_clk,
  input  logic       sir_rst_n,
  output logic       tick16,
  output logic       tx_en_s,
  output logic       rx_en_s,
  output logic       txf_empty_s,
  output logic [7:0] txf_data_s,
  input  logic       txf_pop_s,
  input  logic       rxf_push_s,
  input  logic [7:0] rxf_data_s
);
  import irphy_pkg::*;

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [7:0] brcr;
  logic       txf_push, rxf_pop, rxf_clr;
  logic       txf_full, rxf_empty;
  logic [CW-1:0] txf_wcount, rxf_rcount, txf_rcount_s, rxf_wcount_s;
  logic [7:0] rxf_data;
  logic       rxf_full_s;
  logic       tgl_s1, tgl_s2, tgl_s3, txclr_s;

  // ---------------- host-side registers ----------------
  assign txf_push = sel && wr && addr == A_SIR_TXF;
  assign rxf_pop  = sel && rd && addr == A_SIR_RXF;
  assign rxf_clr  = sel && wr && addr == A_SIR_FCR && wdata[1];

  logic txclr_tgl;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brcr      <= 8'h00;
      txclr_tgl <= 1'b0;
    end else if (sel && wr) begin
      if (addr == A_SIR_BRCR) brcr <= wdata;
      if (addr == A_SIR_FCR && wdata[2]) txclr_tgl <= ~txclr_tgl;
    end
  end

  always_comb begin
    unique case (addr)
      A_MCR:      rdata = 8'h00;   // MCR is read by the IrPHY controller
      A_SIR_BRCR: rdata = brcr;
      A_SIR_RXF:  rdata = rxf_empty ? 8'h00 : rxf_data;
      default:    rdata = 8'h00;
    endcase
  end

  // ---------------- interrupt system ----------------
  assign tx_empty = (txf_wcount == 0);
  assign rx_full  = (rxf_rcount == CW'(DEPTH));
  logic tx_empty_q, rx_full_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_empty_q <= 1'b1;
      rx_full_q  <= 1'b0;
      irq        <= 1'b0;
    end else begin
      tx_empty_q <= tx_empty;
      rx_full_q  <= rx_full;
      irq        <= (tx_empty && !tx_empty_q) || (rx_full && !rx_full_q);
    end
  end

  // ---------------- FIFOs ----------------
  async_fifo #(.DEPTH(DEPTH), .WIDTH(8)) u_txfifo (
    .wclk(clk), .wrst_n(rst_n), .push(txf_push), .wdata(wdata),
    .wfull(txf_full), .wcount(txf_wcount),
    .rclk(sir_clk), .rrst_n(sir_rst_n), .pop(txf_pop_s), .rflush(txclr_s),
    .rdata(txf_data_s), .rempty(txf_empty_s), .rcount(txf_rcount_s));

  async_fifo #(.DEPTH(DEPTH), .WIDTH(8)) u_rxfifo (
    .wclk(sir_clk), .wrst_n(sir_rst_n), .push(rxf_push_s), .wdata(rxf_data_s),
    .wfull(rxf_full_s), .wcount(rxf_wcount_s),
    .rclk(clk), .rrst_n(rst_n), .pop(rxf_pop), .rflush(rxf_clr),
    .rdata(rxf_data), .rempty(rxf_empty), .rcount(rxf_rcount));

  // ---------------- SIR clock domain ----------------
  logic [7:0] brcr_s1, brcr_s2;
  logic [1:0] en_s1, en_s2;
  assign txclr_s = tgl_s2 ^ tgl_s3;
  assign tx_en_s = en_s2[1];
  assign rx_en_s = en_s2[0];

  always_ff @(posedge sir_clk or negedge sir_rst_n) begin
    if (!sir_rst_n) begin
      brcr_s1 <= '0;
      brcr_s2 <= '0;
      en_s1   <= '0;
      en_s2   <= '0;
      tgl_s1  <= 1'b0;
      tgl_s2  <= 1'b0;
      tgl_s3  <= 1'b0;
    end else begin
      brcr_s1 <= brcr;
      brcr_s2 <= brcr_s1;
      en_s1   <= {tx_en, rx_en};
      en_s2   <= en_s1;
      tgl_s1  <= txclr_tgl;
      tgl_s2  <= tgl_s1;
      tgl_s3  <= tgl_s2;
    end
  end

  sir_clock_gen u_clkgen (
    .sir_clk(sir_clk), .rst_n(sir_rst_n), .enable(tx_en_s || rx_en_s),
    .brcr(brcr_s2), .tick16(tick16));
endmodule
