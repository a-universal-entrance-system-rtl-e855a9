// host_interface: Interface Layer between the SNDS100 external bus and the
// core (clock domain 1, 32 MHz).
//
// The host drives active-low chip select, write and output-enable strobes
// asynchronously to the core clock. The strobes pass through two-flop
// synchronisers; the falling edge of (CS and WE) gives a one-cycle `reg_wr`
// (address and write data pass straight through to the core and are used in
// that cycle, so `reg_addr`/`reg_wdata` are plain wires), the falling edge of
// (CS and OE) gives a one-cycle `reg_rd`, and the register value presented on
// `reg_rdata` in that cycle is held on `bus_rdata` until the next read, so a
// read with side effects (FIFO pop, clear-on-read) happens exactly once.
// Timing: address and write data must be stable from the strobe's falling
// edge for at least 3 core clocks, and read data is valid 4 core clocks
// after OE falls. The document says only that the layer connects the
// interrupt, DMA handshake, address and data pins; this strobe protocol is
// this design's choice.
module host_interface (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bus_ncs,
  input  logic       bus_nwe,
  input  logic       bus_noe,
  input  logic [3:0] bus_addr,
  input  logic [7:0] bus_wdata,
  output logic [7:0] bus_rdata,
  output logic       reg_wr,
  output logic       reg_rd,
  output logic [3:0] reg_addr,
  output logic [7:0] reg_wdata,
  input  logic [7:0] reg_rdata
);
  logic [2:0] s1, s2, s3;   // {cs, we, oe}, active high after inversion
  logic       wr_lvl, rd_lvl, wr_lvl_q, rd_lvl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= ~{bus_ncs, bus_nwe, bus_noe};
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign wr_lvl   = s2[2] && s2[1];
  assign rd_lvl   = s2[2] && s2[0];
  assign wr_lvl_q = s3[2] && s3[1];
  assign rd_lvl_q = s3[2] && s3[0];
  assign reg_wr   = wr_lvl && !wr_lvl_q;
  assign reg_rd   = rd_lvl && !rd_lvl_q;
  assign reg_addr  = bus_addr;
  assign reg_wdata = bus_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      bus_rdata <= '0;
    else if (reg_rd) bus_rdata <= reg_rdata;
  end
endmodule
