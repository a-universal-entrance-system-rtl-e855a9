// sir_rx: SIR receiver (clock domain 2), SIR Decoder + SIR Decoder Out.
//
// SIR Decoder, first step: the RZI input (a pulse = 1 for each 0 bit) is
// synchronised with two flops, and every rising edge restarts a 16-tick
// stretch during which the recovered NRZ line is low, giving the signal a
// UART receive pin would see. Second step: a UART receiver waits for the NRZ
// line to fall, checks the start bit at its middle (tick 8), samples eight
// data bits LSB first at the middle of their cells and checks that the stop
// bit is 1.
// SIR Decoder Out: a good frame produces a one-cycle `fifo_push` with the byte
// on `fifo_data`; a frame whose stop bit is 0 is dropped and flagged on
// `frame_err` (the SIR register set has no status bit for it); the receiver
// then waits for the line to return to idle before looking for a start bit.
// The two-step structure and the 16-tick stretch are the document's; the
// sampling points and the drop-on-framing-error rule are this design's.
module sir_rx (
  input  logic       sir_clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       tick16,
  input  logic       ir_rxd,
  output logic       fifo_push,
  output logic [7:0] fifo_data,
  output logic       frame_err,
  output logic       busy
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_STOP, S_BREAK} state_e;

  logic       rxd_s1, rxd_s2, rxd_s3;
  logic [4:0] stretch;
  logic       nrz;
  state_e     state;
  logic [3:0] tick_cnt;
  logic [2:0] bit_cnt;
  logic [7:0] shreg;

  assign nrz  = (stretch == 0);
  assign busy = (state != S_IDLE);

  // Decoder step 1: pulse -> NRZ
  always_ff @(posedge sir_clk or negedge rst_n) begin
    if (!rst_n) begin
      rxd_s1  <= 1'b0;
      rxd_s2  <= 1'b0;
      rxd_s3  <= 1'b0;
      stretch <= '0;
    end else begin
      rxd_s1 <= ir_rxd;
      rxd_s2 <= rxd_s1;
      rxd_s3 <= rxd_s2;
      if (!enable)                  stretch <= '0;
      else if (rxd_s2 && !rxd_s3)   stretch <= 5'd16;
      else if (tick16 && stretch != 0) stretch <= stretch - 1'b1;
    end
  end

  // Decoder step 2: UART frame -> byte; Decoder Out: FIFO write
  always_ff @(posedge sir_clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tick_cnt  <= '0;
      bit_cnt   <= '0;
      shreg     <= '0;
      fifo_push <= 1'b0;
      fifo_data <= '0;
      frame_err <= 1'b0;
    end else begin
      fifo_push <= 1'b0;
      frame_err <= 1'b0;
      if (!enable) begin
        state <= S_IDLE;
      end else if (tick16) begin
        unique case (state)
          S_IDLE: if (!nrz) begin
            state    <= S_START;
            tick_cnt <= 4'd1;
          end
          S_START: begin
            tick_cnt <= tick_cnt + 1'b1;
            if (tick_cnt == 4'd7) begin
              if (!nrz) begin
                state    <= S_DATA;
                tick_cnt <= '0;
                bit_cnt  <= '0;
              end else begin
                state <= S_IDLE;      // glitch, not a start bit
              end
            end
          end
          S_DATA: begin
            tick_cnt <= tick_cnt + 1'b1;
            if (tick_cnt == 4'd15) begin
              shreg   <= {nrz, shreg[7:1]};
              bit_cnt <= bit_cnt + 1'b1;
              if (bit_cnt == 3'd7) state <= S_STOP;
            end
          end
          S_STOP: begin
            tick_cnt <= tick_cnt + 1'b1;
            if (tick_cnt == 4'd15) begin
              state <= S_IDLE;
              if (nrz) begin
                fifo_push <= 1'b1;
                fifo_data <= shreg;
              end else begin
                frame_err <= 1'b1;
                state     <= S_BREAK;
              end
            end
          end
          S_BREAK: if (nrz) state <= S_IDLE;   // wait for an idle line
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
