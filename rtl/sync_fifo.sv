// sync_fifo: single-clock first-word-fall-through byte FIFO.
//
// Used for the FIR TX and RX FIFOs. `rdata` always shows the oldest entry
// (valid while !empty); `pop` removes it. `push` stores `wdata` when there is
// room. When the FIFO is full and OVERWRITE_LAST = 1, a push replaces the
// most recently written entry instead of being dropped: this is the receiver
// overrun behaviour of the FIR RX FIFO ("any new data will overwrite the
// previous received byte"). `clr` empties the FIFO in one cycle and has
// priority over push and pop. `count` is the number of stored entries.
// The 16-entry default follows the FIFO drawing of the FIR controller; the
// first-word-fall-through read port is this design's choice.
module sync_fifo #(
  parameter int unsigned DEPTH          = 16,
  parameter int unsigned WIDTH          = 8,
  parameter bit          OVERWRITE_LAST = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [AW-1:0] dec(input logic [AW-1:0] p);
    return (p == '0) ? AW'(DEPTH - 1) : p - 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rdata = mem[rd_ptr];

  logic do_push, do_pop, do_ovw;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign do_ovw  = OVERWRITE_LAST && push && full && !do_pop;

  always_ff @(posedge clk) begin
    if (do_push)     mem[wr_ptr]      <= wdata;
    else if (do_ovw) mem[dec(wr_ptr)] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);
endmodule
