// fir_controller: FIR registers, FIR FIFOs, FIR interrupt system and FIR
// clock generator (clock domain 1, 32 MHz).
//
// Register requests (one-cycle `wr`/`rd`, valid while `sel`, MCR[4:3] = 01):
//   1 IER   R/W  interrupt enables for IIR[6:0]
//   2 IIR   R    0 RX FIFO at/above trigger level, 1 received end of frame,
//                2 CRC error, 3 RX FIFO overrun, 4 receiver error,
//                5 TX FIFO at/below low level, 6 TX underrun, 7 busy.
//                Bits 2, 3, 4, 6 are cleared by reading IIR; bit 1 clears
//                when the RX FIFO is drained (or read while already empty).
//   3 FCR   R/W  [1:0] RX trigger 8/10/12/14, [2] W clear RX FIFO,
//                [5:4] TX low level 2/4/6/8, [6] W clear TX FIFO (aborts the
//                frame: break), [7] end-of-frame on underrun; reset 0x33
//   4 LCR   R/W  [0] force break, [1] count outgoing data mode
//   5,6 OFDLR0/1 R/W outgoing frame length;  7,8 IFDLR0/1 R incoming length
//   9 RxFIFO R (pops), A TxFIFO W (pushes)
// `rdata` is combinational for `addr`; read side effects happen on `rd`.
// Interrupt system: `irq` is a one-cycle pulse on the rising edge of any
// enabled IIR bit (bits 0..6; IER bit 7 is reserved, so busy has no
// interrupt). `dreq_rx` follows IIR[0] and `dreq_tx` follows IIR[5].
// Receiver overrun: a byte arriving at a full RX FIFO overwrites the last
// stored byte and sets IIR[3].
// FIR clock generator: `chip_en` is high one cycle in four (8 MHz chip rate,
// 125 ns chips) while `enable` is set.
// The register map, bit meanings, trigger levels and overrun rule are the
// document's. Trigger comparisons (>= and <=), the clearing of IIR[1] when the
// RX FIFO drains, the pulse interrupt and DMA always enabled are this
// design's choices.
module fir_controller #(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        sel,
  input  logic        wr,
  input  logic        rd,
  input  logic [3:0]  addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        irq,
  output logic        dreq_rx,
  output logic        dreq_tx,
  output logic        chip_en,
  // FIR TX side
  output logic        txf_empty,
  output logic [7:0]  txf_data,
  input  logic        txf_pop,
  output logic        force_break,
  output logic        count_mode,
  output logic [15:0] ofdl,
  output logic        eof_mode,
  output logic        tx_abort,
  input  logic        tx_underrun,
  input  logic        tx_busy,
  // FIR RX side
  input  logic        rxf_push,
  input  logic [7:0]  rxf_data,
  input  logic        rx_eof,
  input  logic [15:0] rx_len,
  input  logic        rx_crc_err,
  input  logic        rx_err,
  input  logic        rx_busy
);
  import irphy_pkg::*;

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [7:0]  ier, fcr, lcr;
  logic [15:0] ifdl;
  logic [6:0]  sticky;      // IIR bits held in flops (1,2,3,4,6 used)
  logic [7:0]  iir;
  logic        rx_clr, tx_clr, rx_pop, tx_push;
  logic        rxf_empty, rxf_full, txf_full;
  logic [CW-1:0] rxf_count, txf_count;
  logic [7:0]  rxf_head;

  assign rx_clr  = sel && wr && addr == A_FIR_FCR && wdata[2];
  assign tx_clr  = sel && wr && addr == A_FIR_FCR && wdata[6];
  assign rx_pop  = sel && rd && addr == A_FIR_RXF;
  assign tx_push = sel && wr && addr == A_FIR_TXF;
  assign tx_abort = tx_clr;

  assign force_break = lcr[0];
  assign count_mode  = lcr[1];
  assign eof_mode    = fcr[7];

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ier  <= 8'h00;
      fcr  <= FIR_FCR_RESET;
      lcr  <= 8'h00;
      ofdl <= 16'h0000;
      ifdl <= 16'h0000;
    end else begin
      if (sel && wr) begin
        unique case (addr)
          A_FIR_IER:    ier       <= {1'b0, wdata[6:0]};
          A_FIR_FCR:    fcr       <= {wdata[7], 1'b0, wdata[5:4], 2'b00, wdata[1:0]};
          A_FIR_LCR:    lcr       <= wdata;
          A_FIR_OFDLR0: ofdl[7:0] <= wdata;
          A_FIR_OFDLR1: ofdl[15:8] <= wdata;
          default: ;
        endcase
      end
      if (rx_eof) ifdl <= rx_len;
    end
  end

  // ---------------- FIFOs ----------------
  sync_fifo #(.DEPTH(DEPTH), .WIDTH(8), .OVERWRITE_LAST(1'b1)) u_rxfifo (
    .clk(clk), .rst_n(rst_n), .clr(rx_clr), .push(rxf_push), .wdata(rxf_data),
    .pop(rx_pop), .rdata(rxf_head), .empty(rxf_empty), .full(rxf_full), .count(rxf_count));

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(8), .OVERWRITE_LAST(1'b0)) u_txfifo (
    .clk(clk), .rst_n(rst_n), .clr(tx_clr), .push(tx_push), .wdata(wdata),
    .pop(txf_pop), .rdata(txf_data), .empty(txf_empty), .full(txf_full), .count(txf_count));

  // ---------------- interrupt identification ----------------
  logic [4:0] rx_trig, tx_low;
  assign rx_trig = 5'd8 + {2'b00, fcr[1:0], 1'b0};
  assign tx_low  = 5'd2 + {2'b00, fcr[5:4], 1'b0};

  logic iir_rd;
  assign iir_rd = sel && rd && addr == A_FIR_IIR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sticky <= '0;
    end else begin
      // bit 1: end of frame, held until the RX FIFO is drained or cleared;
      // if the FIFO is already empty, reading IIR clears it
      if (rx_eof)
        sticky[IIR_RX_EOF] <= 1'b1;
      else if (rx_clr || (rx_pop && rxf_count == 1) || (iir_rd && rxf_empty))
        sticky[IIR_RX_EOF] <= 1'b0;
      // clear-on-read bits; a new event in the read cycle wins
      if (iir_rd) begin
        sticky[IIR_CRC_ERR] <= 1'b0;
        sticky[IIR_RX_OVR]  <= 1'b0;
        sticky[IIR_RX_ERR]  <= 1'b0;
        sticky[IIR_TX_UNDR] <= 1'b0;
      end
      if (rx_crc_err)           sticky[IIR_CRC_ERR] <= 1'b1;
      if (rxf_push && rxf_full) sticky[IIR_RX_OVR]  <= 1'b1;
      if (rx_err)               sticky[IIR_RX_ERR]  <= 1'b1;
      if (tx_underrun)          sticky[IIR_TX_UNDR] <= 1'b1;
    end
  end

  always_comb begin
    iir              = {1'b0, sticky};
    iir[IIR_RX_TRIG] = ({{(8-CW){1'b0}}, rxf_count} >= {3'b000, rx_trig});
    iir[IIR_TX_LOW]  = ({{(8-CW){1'b0}}, txf_count} <= {3'b000, tx_low});
    iir[IIR_BUSY]    = tx_busy || rx_busy;
  end

  assign dreq_rx = iir[IIR_RX_TRIG];
  assign dreq_tx = iir[IIR_TX_LOW];

  logic [6:0] act_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= '0;
      irq   <= 1'b0;
    end else begin
      act_q <= iir[6:0] & ier[6:0];
      irq   <= |((iir[6:0] & ier[6:0]) & ~act_q);
    end
  end

  // ---------------- read mux ----------------
  always_comb begin
    unique case (addr)
      A_FIR_IER:    rdata = ier;
      A_FIR_IIR:    rdata = iir;
      A_FIR_FCR:    rdata = fcr;
      A_FIR_LCR:    rdata = lcr;
      A_FIR_OFDLR0: rdata = ofdl[7:0];
      A_FIR_OFDLR1: rdata = ofdl[15:8];
      A_FIR_IFDLR0: rdata = ifdl[7:0];
      A_FIR_IFDLR1: rdata = ifdl[15:8];
      A_FIR_RXF:    rdata = rxf_empty ? 8'h00 : rxf_head;
      default:      rdata = 8'h00;
    endcase
  end

  // ---------------- FIR clock generator ----------------
  logic [1:0] div;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       div <= '0;
    else if (!enable) div <= '0;
    else              div <= div + 1'b1;
  end
  assign chip_en = enable && (div == 2'd3);
endmodule
