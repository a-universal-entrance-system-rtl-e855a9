// sir_tx: SIR transmitter (clock domain 2), SIR Encoder In + SIR Encoder.
//
// Encoder In: when the transmitter is enabled, idle, and the SIR TX FIFO is not
// empty, it pops one byte on a 16x bit-rate tick; bytes already waiting are
// sent back to back. Encoder: the byte is sent as
// an ordinary UART frame (start bit 0, eight data bits LSB first, stop bit 1),
// each bit 16 ticks long, and the frame is modulated to RZI: a 0 bit becomes a
// pulse (ir_txd = 1) for 3 of its 16 ticks, a 1 bit sends nothing. This
// follows the document (UART frame, 3/16 pulse, 16x clock). Placing the
// pulse in the first 3 ticks of the bit cell is this design's choice.
// Timing: the frame lasts 160 ticks; `ir_txd` is registered and follows the
// internal state by one SIR clock. `busy` is high during a frame.
module sir_tx (
  input  logic       sir_clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       tick16,
  input  logic       fifo_empty,
  input  logic [7:0] fifo_data,
  output logic       fifo_pop,
  output logic       ir_txd,
  output logic       busy
);
  logic [9:0] shreg;      // frame bits still to send, current bit in [0]
  logic [3:0] bit_left;   // bits remaining after the current one
  logic [3:0] tick_cnt;   // tick within the current bit cell

  // a new byte is taken when idle, or on the tick that ends the stop bit so
  // that bytes follow each other without a gap
  assign fifo_pop = enable && tick16 && !fifo_empty &&
                    (!busy || (tick_cnt == 4'd15 && bit_left == 0));

  always_ff @(posedge sir_clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg    <= '1;
      bit_left <= '0;
      tick_cnt <= '0;
      busy     <= 1'b0;
      ir_txd   <= 1'b0;
    end else begin
      if (fifo_pop) begin
        // Encoder In: load {stop, data, start}
        shreg    <= {1'b1, fifo_data, 1'b0};
        bit_left <= 4'd9;
        tick_cnt <= '0;
        busy     <= 1'b1;
      end else if (busy && tick16) begin
        if (tick_cnt == 4'd15) begin
          tick_cnt <= '0;
          shreg    <= {1'b1, shreg[9:1]};
          if (bit_left == 0) busy <= 1'b0;
          else               bit_left <= bit_left - 1'b1;
        end else begin
          tick_cnt <= tick_cnt + 1'b1;
        end
      end
      // Encoder: 3/16 RZI pulse for a 0 bit
      ir_txd <= busy && !shreg[0] && (tick_cnt < 4'd3);
    end
  end
endmodule
