// fir_rx: 4 Mb/s (FIR) receiver: Bit Synchronizer, Flag Detector, 4PPM
// Decoder, CRC32 check and RX to FIFO.
//
// Runs on the 32 MHz clock, four samples per 125 ns chip.
// Bit Synchronizer: the transceiver signal is synchronised with two flops;
// each rising edge of a pulse restarts a modulo-4 phase counter, and the chip
// value is sampled two clocks after the edge (mid-chip). The PA preamble,
// with a pulse in every bit pair, locks the phase before the data starts.
// Flag Detector: keeps the last 32 chips. It waits for a PA (16 chips); then,
// 16 chips after each PA it expects another PA, or 32 chips after the last PA
// the STA flag, which fixes the bit-pair boundary. Anything else is a wrong
// flag (`rx_err`). After STA every 4 chips form one symbol: a legal symbol
// (exactly one chip set) goes to the 4PPM Decoder; the first illegal symbol
// starts a STO check over the next 28 chips. A full STO ends the frame;
// anything else is an illegal 4PPM value (`rx_err`) and drops the frame.
// 4PPM Decoder: the pulse position gives the bit pair (1000 -> 00, 0100 ->
// 01, 0010 -> 10, 0001 -> 11, first bit on the left), bits LSB first.
// CRC32: all decoded bits, FCS included, go through the CRC register; at STO
// the register must hold 0xC704DD7B, else `crc_err` pulses.
// RX to FIFO: bits are packed into bytes. Since the end of the payload is only
// known at STO, the last four bytes are held back; each new byte pushes the
// oldest held one into the FIFO, and at STO the four held bytes, the FCS, are
// dropped. `eof` pulses at STO with `frame_len` = payload bytes (a frame
// shorter than its FCS or not a whole number of bytes is an `rx_err`).
// Detection of PA/STA/STO, 4PPM decoding, the CRC check and the residue are
// the document's; the synchroniser method, the flag sequencing rules and the
// hold-back buffer are this design's.
module fir_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        ir_rxd,
  output logic        fifo_push,
  output logic [7:0]  fifo_data,
  output logic        eof,
  output logic [15:0] frame_len,
  output logic        crc_err,
  output logic        rx_err,
  output logic        busy
);
  import irphy_pkg::*;

  typedef enum logic [1:0] {R_HUNT, R_PRE, R_DATA, R_STO} rstate_e;

  // ---------------- Bit Synchronizer ----------------
  logic       s1, s2, s3;
  logic [1:0] ph;
  logic       chip_v, chip;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
      ph <= '0;
    end else begin
      s1 <= ir_rxd;
      s2 <= s1;
      s3 <= s2;
      ph <= (s2 && !s3) ? 2'd1 : ph + 1'b1;
    end
  end
  assign chip_v = enable && (ph == 2'd2);
  assign chip   = s2;

  // ---------------- Flag Detector / decoder ----------------
  rstate_e     state;
  logic [31:0] hist, h_next;
  logic [5:0]  cnt;
  logic [1:0]  pair;
  logic        legal;
  assign h_next = {hist[30:0], chip};

  always_comb begin
    legal = 1'b1;
    pair  = 2'b00;
    unique case (h_next[3:0])
      4'b1000: pair = 2'b00;
      4'b0100: pair = 2'b01;
      4'b0010: pair = 2'b10;
      4'b0001: pair = 2'b11;
      default: legal = 1'b0;
    endcase
  end

  // CRC32 checker, fed each pair in the two following cycles
  logic        crc_clr, crc_en, crc_ok, crc_dout_unused;
  logic [31:0] crc_reg_unused;
  logic [1:0]  feed_cnt, feed_bits;
  assign crc_en = (feed_cnt != 0);
  crc32 u_crc (
    .clk(clk), .rst_n(rst_n), .clr(crc_clr), .en(crc_en), .din(feed_bits[1]),
    .fcs_mode(1'b0), .bad_fcs(1'b0), .dout(crc_dout_unused), .crc(crc_reg_unused),
    .residue_ok(crc_ok));

  // RX to FIFO
  logic [7:0]  sh;          // byte being assembled
  logic [1:0]  npairs;      // pairs in sh
  logic [7:0]  hold [4];    // held-back bytes, [0] oldest
  logic [2:0]  nhold;
  logic [15:0] npushed;

  assign busy = (state != R_HUNT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_HUNT;
      hist      <= '0;
      cnt       <= '0;
      crc_clr   <= 1'b0;
      feed_cnt  <= '0;
      feed_bits <= '0;
      sh        <= '0;
      npairs    <= '0;
      nhold     <= '0;
      npushed   <= '0;
      for (int i = 0; i < 4; i++) hold[i] <= '0;
      fifo_push <= 1'b0;
      fifo_data <= '0;
      eof       <= 1'b0;
      frame_len <= '0;
      crc_err   <= 1'b0;
      rx_err    <= 1'b0;
    end else begin
      crc_clr   <= 1'b0;
      fifo_push <= 1'b0;
      eof       <= 1'b0;
      crc_err   <= 1'b0;
      rx_err    <= 1'b0;
      if (feed_cnt != 0) begin
        feed_cnt  <= feed_cnt - 1'b1;
        feed_bits <= {feed_bits[0], 1'b0};
      end

      if (!enable) begin
        state <= R_HUNT;
        hist  <= '0;
      end else if (chip_v) begin
        hist <= h_next;
        unique case (state)
          R_HUNT: if (h_next[15:0] == PA_CHIPS) begin
            state <= R_PRE;
            cnt   <= '0;
          end
          R_PRE: begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'd15 && h_next[15:0] == PA_CHIPS) begin
              cnt <= '0;
            end else if (cnt == 6'd31) begin
              if (h_next == STA_CHIPS) begin
                state   <= R_DATA;
                cnt     <= '0;
                crc_clr <= 1'b1;
                npairs  <= '0;
                nhold   <= '0;
                npushed <= '0;
              end else begin
                state  <= R_HUNT;
                rx_err <= 1'b1;   // wrong flag
              end
            end
          end
          R_DATA: begin
            cnt <= cnt + 1'b1;
            if (cnt[1:0] == 2'd3) begin
              if (legal) begin
                // 4PPM Decoder: first bit of the pair is pair[1]
                feed_cnt  <= 2'd2;
                feed_bits <= pair;
                sh        <= {pair[0], pair[1], sh[7:2]};
                npairs    <= npairs + 1'b1;
                if (npairs == 2'd3) begin
                  // a whole byte: {pair[0], pair[1], sh[7:2]}
                  if (nhold == 3'd4) begin
                    fifo_push <= 1'b1;
                    fifo_data <= hold[0];
                    npushed   <= npushed + 1'b1;
                    hold[0]   <= hold[1];
                    hold[1]   <= hold[2];
                    hold[2]   <= hold[3];
                    hold[3]   <= {pair[0], pair[1], sh[7:2]};
                  end else begin
                    hold[nhold[1:0]] <= {pair[0], pair[1], sh[7:2]};
                    nhold            <= nhold + 1'b1;
                  end
                end
              end else begin
                state <= R_STO;
                cnt   <= 6'd4;
              end
            end
          end
          R_STO: begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'd31) begin
              state <= R_HUNT;
              if (h_next == STO_CHIPS && nhold == 3'd4 && npairs == 2'd0) begin
                eof       <= 1'b1;
                frame_len <= npushed;
                crc_err   <= !crc_ok;
              end else begin
                rx_err <= 1'b1;   // illegal 4PPM data or broken frame
              end
            end
          end
          default: state <= R_HUNT;
        endcase
      end
    end
  end
endmodule
