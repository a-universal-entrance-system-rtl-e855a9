// fir_tx: 4 Mb/s (FIR) transmitter: FIFO to TX, CRC32, 4PPM Encoder, Flag
// Generator and output MUX.
//
// Runs on the 32 MHz clock; `chip_en` (one cycle in four, from the FIR clock
// generator) marks each 125 ns chip. A frame is
//   16 x PA (16 chips each) | STA (32 chips) | payload | FCS (32 bits) | STO (32 chips)
// Flags are sent chip by chip from fixed patterns (Flag Generator). Payload
// bytes are taken from the TX FIFO (FIFO to TX), LSB first, two bits at a
// time; each data bit pair (first bit, second bit) read as a 2-bit number
// selects the chip that carries the pulse: 00 -> 1000, 01 -> 0100,
// 10 -> 0010, 11 -> 0001 (4PPM Encoder). The payload bits also go through
// the CRC32 generator; after the last byte its inverted register is sent the
// same way, MSB of the register first.
// A frame starts when `enable` is high, `force_break` is low and the FIFO
// holds data. It ends normally when `count_mode` is set and `ofdl` bytes have
// been sent, or when the FIFO runs empty with `eof_mode` set (this also
// pulses `underrun`). If the FIFO runs empty with `eof_mode` clear, or
// `abort_frame` is pulsed, the frame is cut off and the line stays at 0 (break);
// the empty-FIFO case pulses `underrun`. `ir_txd` is registered, 1 = pulse;
// `force_break` holds it at 0.
// The frame layout, flag patterns, bit order into the CRC, the two end-of-
// frame rules and the break on underrun follow the document; the order of
// the bits inside a pair and the start condition are this design's choices.
module fir_tx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        chip_en,
  input  logic        fifo_empty,
  input  logic [7:0]  fifo_data,
  output logic        fifo_pop,
  input  logic        force_break,
  input  logic        count_mode,
  input  logic [15:0] ofdl,
  input  logic        eof_mode,
  input  logic        abort_frame,
  output logic        ir_txd,
  output logic        busy,
  output logic        underrun,
  output logic        frame_done
);
  import irphy_pkg::*;

  typedef enum logic [2:0] {T_IDLE, T_PA, T_STA, T_DATA, T_FCS, T_STO} tstate_e;

  tstate_e     state;
  logic [31:0] seg;        // chips of the current segment, next chip in [31]
  logic [5:0]  seg_left;   // chips left in the current segment
  logic [3:0]  pa_left;    // PA repetitions left after the current one
  logic [7:0]  byte_q;     // byte being sent
  logic [1:0]  sym_idx;    // bit pair of byte_q being sent
  logic [3:0]  fcs_left;   // FCS bit pairs left after the current one
  logic [15:0] sent;       // payload bytes taken in this frame
  logic        txd_q;

  // CRC32 generator, fed two bits in the two cycles after a pair is loaded
  logic        crc_clr, crc_en, crc_din, crc_fcs, crc_dout_unused;
  logic [31:0] crc_reg;
  logic        crc_ok_unused;
  logic [1:0]  feed_cnt;
  logic [1:0]  feed_bits;
  logic        feed_fcs;

  crc32 u_crc (
    .clk(clk), .rst_n(rst_n), .clr(crc_clr), .en(crc_en), .din(crc_din),
    .fcs_mode(crc_fcs), .bad_fcs(1'b0), .dout(crc_dout_unused), .crc(crc_reg),
    .residue_ok(crc_ok_unused));

  assign crc_en  = (feed_cnt != 0);
  assign crc_din = feed_bits[1];
  assign crc_fcs = feed_fcs;

  // decisions at the end of a segment
  logic last_chip, need_byte, have_byte, byte_limit;
  assign last_chip  = chip_en && (state != T_IDLE) && (seg_left == 6'd1);
  assign byte_limit = count_mode && (sent == ofdl);
  assign need_byte  = last_chip && ((state == T_STA) || (state == T_DATA && sym_idx == 2'd3));
  assign have_byte  = !fifo_empty && !byte_limit;
  assign fifo_pop   = need_byte && have_byte && !abort_frame;

  assign busy   = (state != T_IDLE);
  assign ir_txd = txd_q && !force_break;

  function automatic logic [31:0] sym_seg(input logic [1:0] pair);
    return {ppm_encode(pair), 28'h0};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      seg        <= '0;
      seg_left   <= '0;
      pa_left    <= '0;
      byte_q     <= '0;
      sym_idx    <= '0;
      fcs_left   <= '0;
      sent       <= '0;
      txd_q      <= 1'b0;
      underrun   <= 1'b0;
      frame_done <= 1'b0;
      crc_clr    <= 1'b0;
      feed_cnt   <= '0;
      feed_bits  <= '0;
      feed_fcs   <= 1'b0;
    end else begin
      underrun   <= 1'b0;
      frame_done <= 1'b0;
      crc_clr    <= 1'b0;
      if (feed_cnt != 0) begin
        feed_cnt  <= feed_cnt - 1'b1;
        feed_bits <= {feed_bits[0], 1'b0};
      end

      if (abort_frame && state != T_IDLE) begin
        state <= T_IDLE;
        txd_q <= 1'b0;
      end else if (chip_en) begin
        txd_q <= (state != T_IDLE) ? seg[31] : 1'b0;
        seg      <= {seg[30:0], 1'b0};
        seg_left <= seg_left - 1'b1;
        unique case (state)
          T_IDLE: if (enable && !force_break && !fifo_empty) begin
            state    <= T_PA;
            seg      <= {PA_CHIPS, 16'h0};
            seg_left <= 6'd16;
            pa_left  <= 4'(PA_REPEAT - 1);
            sent     <= '0;
            crc_clr  <= 1'b1;
          end
          T_PA: if (seg_left == 6'd1) begin
            seg_left <= (pa_left == 0) ? 6'd32 : 6'd16;
            seg      <= (pa_left == 0) ? STA_CHIPS : {PA_CHIPS, 16'h0};
            state    <= (pa_left == 0) ? T_STA : T_PA;
            pa_left  <= pa_left - 1'b1;
          end
          T_STA, T_DATA: if (seg_left == 6'd1) begin
            if (state == T_DATA && sym_idx != 2'd3) begin
              // next bit pair of the current byte
              seg       <= sym_seg({byte_q[2*sym_idx+2], byte_q[2*sym_idx+3]});
              seg_left  <= 6'd4;
              sym_idx   <= sym_idx + 1'b1;
              feed_cnt  <= 2'd2;
              feed_bits <= {byte_q[2*sym_idx+2], byte_q[2*sym_idx+3]};
              feed_fcs  <= 1'b0;
            end else if (have_byte) begin
              // FIFO to TX: start the next byte
              byte_q    <= fifo_data;
              sent      <= sent + 1'b1;
              seg       <= sym_seg({fifo_data[0], fifo_data[1]});
              seg_left  <= 6'd4;
              sym_idx   <= 2'd0;
              state     <= T_DATA;
              feed_cnt  <= 2'd2;
              feed_bits <= {fifo_data[0], fifo_data[1]};
              feed_fcs  <= 1'b0;
            end else if (byte_limit || eof_mode) begin
              // normal end of payload: send the FCS
              underrun  <= !byte_limit;
              seg       <= sym_seg(~crc_reg[31:30]);
              seg_left  <= 6'd4;
              fcs_left  <= 4'd15;
              state     <= T_FCS;
              feed_cnt  <= 2'd2;
              feed_bits <= '0;
              feed_fcs  <= 1'b1;
            end else begin
              // underrun without end-of-frame: abort, line goes to break
              underrun <= 1'b1;
              state    <= T_IDLE;
              seg      <= '0;
            end
          end
          T_FCS: if (seg_left == 6'd1) begin
            if (fcs_left == 0) begin
              seg      <= STO_CHIPS;
              seg_left <= 6'd32;
              state    <= T_STO;
            end else begin
              seg       <= sym_seg(~crc_reg[31:30]);
              seg_left  <= 6'd4;
              fcs_left  <= fcs_left - 1'b1;
              feed_cnt  <= 2'd2;
              feed_bits <= '0;
              feed_fcs  <= 1'b1;
            end
          end
          T_STO: if (seg_left == 6'd1) begin
            state      <= T_IDLE;
            frame_done <= 1'b1;
          end
          default: state <= T_IDLE;
        endcase
      end
    end
  end

  a_pop_not_empty: assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |-> !fifo_empty);
endmodule
