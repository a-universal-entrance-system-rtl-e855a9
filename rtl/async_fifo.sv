// async_fifo: dual-clock first-word-fall-through FIFO for the SIR data path.
//
// The SIR TX and RX FIFOs connect clock domain 1 (32 MHz host side) with
// clock domain 2 (115200*16 Hz SIR side). Pointers are DEPTH*2-range binary
// counters; each side passes its pointer to the other in Gray code through a
// two-flop synchroniser, so `wfull`/`wcount` (write side) and
// `rempty`/`rcount` (read side) are conservative: they see the other side's
// progress two to three of their own clocks late.
// `rflush` (read side) empties the FIFO by moving the read pointer to the
// synchronised write pointer; FIFO clear is done this way so that no reset has
// to cross between the domains. Each side has its own active-low reset, which
// must be asserted together. DEPTH must be a power of two.
// The document places these FIFOs in the SIR registers; their depth, the Gray
// code crossing and the flush are this design's choices.
module async_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8
) (
  input  logic                       wclk,
  input  logic                       wrst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  output logic                       wfull,
  output logic [$clog2(DEPTH+1)-1:0] wcount,
  input  logic                       rclk,
  input  logic                       rrst_n,
  input  logic                       pop,
  input  logic                       rflush,
  output logic [WIDTH-1:0]           rdata,
  output logic                       rempty,
  output logic [$clog2(DEPTH+1)-1:0] rcount
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  assign rbin_w = g2b(rgray_w2);
  assign wcount = CW'(wbin - rbin_w);
  assign wfull  = (wcount == CW'(DEPTH));

  always_ff @(posedge wclk) if (push && !wfull) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (push && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end

  // ---------------- read side -----------------
  assign wbin_r = g2b(wgray_r2);
  assign rcount = CW'(wbin_r - rbin);
  assign rempty = (rcount == 0);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rflush) begin
        rbin  <= wbin_r;
        rgray <= wgray_r2;
      end else if (pop && !rempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end

  a_no_overfill: assert property (@(posedge wclk) disable iff (!wrst_n) wcount <= CW'(DEPTH));
endmodule
