// irphy_top_tb: end-to-end test of two full-size IrPHY cores.
//
// Core A's transmitter drives core B's receiver and B's transmitter drives
// A's receiver, as two transceivers facing each other. The testbench also
// has its own FIR frame generator (written from the frame format, not from
// the RTL) that can take over B's receive line. Every access goes through
// the asynchronous host bus pins (chip select, write and output enable
// strobes), and the FIR transmit side is fed from the DMA request pin.
// Mechanisms exercised and counted (the test fails if any never happens):
//   SIR transfer at each of the five rates, SIR FIFO interrupts,
//   engines held idle while MCR[0] is set, FIR frame ended by count mode,
//   FIR frame ended by an empty FIFO with FCR[7] set, TX and RX DMA
//   requests, RX trigger interrupt, underrun abort, forced break, frame
//   abort with FCR[6], CRC error, reception of an independently built
//   frame, RX FIFO overrun, a 300-byte frame (length above 255).
`timescale 1ns/1ps
module irphy_top_tb;
  import irphy_pkg::*;
  import irphy_tb_pkg::*;

  logic clk = 0, sir_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge for the async resets
  logic       ncs[2] = '{1, 1}, nwe[2] = '{1, 1}, noe[2] = '{1, 1};
  logic [3:0] baddr[2] = '{0, 0};
  logic [7:0] bwd[2] = '{0, 0};
  logic [7:0] brd[2];
  logic       irq[2], dreq_rx[2], dreq_tx[2], txd[2];
  logic       inj_en = 0, inj_chip = 0, b_rxd;
  int checks = 0, failures = 0;

  always #15.625 clk = ~clk;       // 32 MHz
  always #271.267 sir_clk = ~sir_clk; // 1.8432 MHz = 16 x 115200

  assign b_rxd = inj_en ? inj_chip : txd[0];

  irphy_top u_a (
    .clk(clk), .sir_clk(sir_clk), .rst_n(rst_n),
    .bus_ncs(ncs[0]), .bus_nwe(nwe[0]), .bus_noe(noe[0]), .bus_addr(baddr[0]),
    .bus_wdata(bwd[0]), .bus_rdata(brd[0]),
    .irq(irq[0]), .dreq_rx(dreq_rx[0]), .dreq_tx(dreq_tx[0]),
    .ir_rxd(txd[1]), .ir_txd(txd[0]));

  irphy_top u_b (
    .clk(clk), .sir_clk(sir_clk), .rst_n(rst_n),
    .bus_ncs(ncs[1]), .bus_nwe(nwe[1]), .bus_noe(noe[1]), .bus_addr(baddr[1]),
    .bus_wdata(bwd[1]), .bus_rdata(brd[1]),
    .irq(irq[1]), .dreq_rx(dreq_rx[1]), .dreq_tx(dreq_tx[1]),
    .ir_rxd(b_rxd), .ir_txd(txd[1]));

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_SIR_9600, M_SIR_115K, M_SIR_OTHER, M_SIR_IRQ, M_SWITCH_HOLD, M_FIR_COUNT, M_FIR_EOF,
    M_DMA_TX, M_DMA_RX, M_RX_TRIG_IRQ, M_UNDERRUN, M_BREAK, M_ABORT,
    M_CRC_ERR, M_INJ_GOOD, M_OVERRUN, M_FIR_LONG, M_NUM
  } mech_e;
  int mech[M_NUM];
  string mech_name[M_NUM] = '{"SIR 9600", "SIR 115200", "SIR 19200/38400/57600", "SIR FIFO interrupt",
    "idle while switching", "FIR count mode frame", "FIR end-of-frame mode",
    "TX DMA request", "RX DMA request", "RX trigger interrupt",
    "underrun abort", "forced break", "FCR[6] abort", "CRC error",
    "generated frame received", "RX overrun", "FIR frame over 255 bytes"};

  // pulses on A's line and interrupt pulses
  int a_pulses = 0, n_irq[2] = '{0, 0}, n_dreq_rx = 0;
  logic a_q = 0, drx_q = 0;
  always @(posedge clk) begin
    a_q <= txd[0];
    if (txd[0] && !a_q) a_pulses <= a_pulses + 1;
    if (irq[0]) n_irq[0] <= n_irq[0] + 1;
    if (irq[1]) n_irq[1] <= n_irq[1] + 1;
    drx_q <= dreq_rx[1];
    if (dreq_rx[1] && !drx_q) n_dreq_rx <= n_dreq_rx + 1;
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- host bus ----------------
  task automatic bw(input int u, input logic [3:0] a, input logic [7:0] d);
    baddr[u] = a; bwd[u] = d;
    #20 ncs[u] = 0; nwe[u] = 0;
    #130 nwe[u] = 1; ncs[u] = 1;
    #70;
  endtask
  task automatic br(input int u, input logic [3:0] a, output logic [7:0] d);
    baddr[u] = a;
    #20 ncs[u] = 0; noe[u] = 0;
    #200 d = brd[u]; noe[u] = 1; ncs[u] = 1;
    #70;
  endtask
  // MCR change through the mode-switch state
  task automatic set_mode(input int u, input speed_e sp, input bit tx);
    logic [7:0] d;
    bw(u, A_MCR, {3'b000, sp, 1'b0, tx, 1'b1});
    br(u, A_MCR, d);
    check(d == {3'b000, sp, 1'b0, tx, 1'b1}, "MCR read back");
    bw(u, A_MCR, {3'b000, sp, 1'b0, tx, 1'b0});
  endtask

  function automatic bytes_t rand_bytes(input int n);
    bytes_t q;
    repeat (n) q.push_back(8'($urandom));
    return q;
  endfunction

  // ---------------- SIR ----------------
  task automatic sir_transfer(input int tx, input int rx, input logic [7:0] brcr,
                              input int n, input mech_e m);
    bytes_t data = rand_bytes(n);
    logic [7:0] d;
    int ok = 1, i_tx, i_rx;
    real bit_ns = 1.0e9 / (115200.0 / real'(sir_divisor(brcr)));
    set_mode(rx, SPEED_SIR, 1'b0);
    bw(rx, A_SIR_BRCR, brcr);
    bw(rx, A_SIR_FCR, 8'h02);       // clear RX FIFO
    bw(tx, A_MCR, {3'b000, SPEED_SIR, 2'b01, 1'b1});
    bw(tx, A_SIR_BRCR, brcr);
    bw(tx, A_MCR, {3'b000, SPEED_SIR, 2'b01, 1'b0});
    i_tx = n_irq[tx]; i_rx = n_irq[rx];
    foreach (data[i]) bw(tx, A_SIR_TXF, data[i]);
    #(bit_ns * 10.0 * (n + 1));
    foreach (data[i]) begin
      br(rx, A_SIR_RXF, d);
      if (d != data[i]) begin
        ok = 0;
        check(0, $sformatf("SIR byte %0d got %02h expected %02h", i, d, data[i]));
      end
    end
    check(ok == 1, $sformatf("SIR transfer of %0d bytes, BRCR %0d", n, brcr));
    check(n_irq[tx] > i_tx, "SIR TX FIFO empty interrupt");
    if (n == SIR_DEPTH) check(n_irq[rx] > i_rx, "SIR RX FIFO full interrupt");
    if (ok == 1) mech[m]++;
    if (n_irq[tx] > i_tx && (n != SIR_DEPTH || n_irq[rx] > i_rx)) mech[M_SIR_IRQ]++;
  endtask
  localparam int SIR_DEPTH = 16;

  // ---------------- FIR ----------------
  // feed A's TX FIFO from the DMA request pin
  task automatic fir_feed(input bytes_t data, input int first);
    int i = first;
    while (i < data.size()) begin
      wait (dreq_tx[0]);
      mech[M_DMA_TX]++;
      repeat (8) if (i < data.size()) begin bw(0, A_FIR_TXF, data[i]); i++; end
    end
  endtask

  // read one frame from B: 8 bytes per trigger, the rest after end of frame
  task automatic fir_read(output bytes_t got, output logic [7:0] flags, input int limit_us);
    logic [7:0] d, l0, l1, b;
    int len;
    realtime t0 = $realtime;
    got = {}; flags = 0;
    forever begin
      br(1, A_FIR_IIR, d);
      flags |= d;
      if (d[IIR_RX_EOF]) begin
        br(1, A_FIR_IFDLR0, l0);
        br(1, A_FIR_IFDLR1, l1);
        len = int'({l1, l0});
        while (got.size() < len) begin br(1, A_FIR_RXF, b); got.push_back(b); end
        br(1, A_FIR_IIR, d);
        flags |= d;
        return;
      end
      if (d[IIR_RX_TRIG]) repeat (8) begin br(1, A_FIR_RXF, b); got.push_back(b); end
      if (d[IIR_RX_ERR] || $realtime - t0 > real'(limit_us) * 1000.0) return;
    end
  endtask

  task automatic inject(input chips_t c);
    @(posedge clk);
    inj_en = 1;
    foreach (c[i]) begin inj_chip = c[i]; repeat (4) @(posedge clk); end
    inj_chip = 0;
    repeat (8) @(posedge clk);
    inj_en = 0;
  endtask

  function automatic bit same(bytes_t a, bytes_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  // frame sent by A with the given settings, received by B
  task automatic fir_frame_a_to_b(input int n, input bit count_mode, input mech_e m);
    bytes_t data = rand_bytes(n), got;
    logic [7:0] flags, a_iir;
    int p0, irq0, dr0;
    // load registers and FIFO while A is held in the mode switch: the line
    // stays idle
    bw(0, A_MCR, {3'b000, SPEED_FIR, 2'b01, 1'b1});
    p0 = a_pulses;
    br(0, A_FIR_IIR, a_iir);          // clear A's sticky bits
    if (count_mode) begin
      bw(0, A_FIR_FCR, 8'h33);
      bw(0, A_FIR_LCR, 8'h02);
      bw(0, A_FIR_OFDLR0, 8'(n));
      bw(0, A_FIR_OFDLR1, 8'(n >> 8));
    end else begin
      bw(0, A_FIR_FCR, 8'hB3);        // end of frame on empty FIFO
      bw(0, A_FIR_LCR, 8'h00);
    end
    for (int i = 0; i < 16 && i < n; i++) bw(0, A_FIR_TXF, data[i]);
    #20us;
    check(a_pulses == p0, "no transmission while MCR[0] is set");
    if (a_pulses == p0) mech[M_SWITCH_HOLD]++;
    irq0 = n_irq[1]; dr0 = n_dreq_rx;
    bw(0, A_MCR, {3'b000, SPEED_FIR, 2'b01, 1'b0});
    fork
      fir_feed(data, 16);
      fir_read(got, flags, 80 + n * 3);
    join
    check(same(got, data), $sformatf("FIR frame of %0d bytes (count mode %0d): got %0d bytes",
                                     n, count_mode, got.size()));
    check(!flags[IIR_CRC_ERR] && !flags[IIR_RX_ERR], $sformatf("FIR frame error flags %02h", flags));
    if (same(got, data) && !flags[IIR_CRC_ERR]) mech[m]++;
    if (n >= 14) begin
      check(n_irq[1] > irq0, "RX trigger interrupt");
      check(n_dreq_rx > dr0, "RX DMA request");
      if (n_irq[1] > irq0) mech[M_RX_TRIG_IRQ]++;
      if (n_dreq_rx > dr0) mech[M_DMA_RX]++;
    end
    #5us;
    br(0, A_FIR_IIR, a_iir);
    check(!a_iir[IIR_BUSY], "A idle after the frame");
    check(a_iir[IIR_TX_UNDR] == !count_mode, $sformatf("underrun flag %0d", a_iir[IIR_TX_UNDR]));
  endtask

  initial begin
    bytes_t data, got;
    logic [7:0] d, flags;
    int p0, n;
    #200ns rst_n = 1;
    #1us;
    br(0, A_MCR, d); check(d == 8'h00, "MCR reset value");

    // ---- SIR, both directions, two baud rates ----
    sir_transfer(0, 1, 8'd0, 4, M_SIR_9600);
    sir_transfer(1, 0, 8'd4, SIR_DEPTH, M_SIR_115K);
    sir_transfer(0, 1, 8'd2, 6, M_SIR_OTHER);  // 38400
    sir_transfer(1, 0, 8'd1, 2, M_SIR_OTHER);  // 19200
    sir_transfer(0, 1, 8'd3, 3, M_SIR_OTHER);  // 57600

    // ---- FIR: B receives with trigger interrupt enabled ----
    set_mode(1, SPEED_FIR, 1'b0);
    bw(1, A_FIR_FCR, 8'h37);          // trigger 14, clear RX FIFO
    bw(1, A_FIR_IER, 8'h01);
    fir_frame_a_to_b(40, 1'b1, M_FIR_COUNT);
    fir_frame_a_to_b(3 + $urandom_range(0, 60), 1'b0, M_FIR_EOF);
    fir_frame_a_to_b(1, 1'b1, M_FIR_COUNT);
    fir_frame_a_to_b(300, 1'b1, M_FIR_LONG);  // length needs OFDLR1/IFDLR1

    // ---- underrun without end-of-frame mode: frame cut off, line at break ----
    bw(0, A_FIR_FCR, 8'h33);
    bw(0, A_FIR_LCR, 8'h00);
    br(0, A_FIR_IIR, d);
    br(1, A_FIR_IIR, d);
    for (int i = 0; i < 5; i++) bw(0, A_FIR_TXF, 8'($urandom));
    #100us;
    br(0, A_FIR_IIR, d);
    check(d[IIR_TX_UNDR] && !d[IIR_BUSY], $sformatf("underrun abort, A IIR %02h", d));
    check(txd[0] == 0, "line at 0 after underrun abort");
    br(1, A_FIR_IIR, flags);
    check(!flags[IIR_RX_EOF] && flags[IIR_RX_ERR], $sformatf("B sees a broken frame, IIR %02h", flags));
    if (d[IIR_TX_UNDR] && !flags[IIR_RX_EOF]) mech[M_UNDERRUN]++;
    bw(1, A_FIR_FCR, 8'h37);

    // ---- forced break: data waiting, nothing sent ----
    bw(0, A_FIR_LCR, 8'h01);
    p0 = a_pulses;
    for (int i = 0; i < 3; i++) bw(0, A_FIR_TXF, 8'($urandom));
    #60us;
    check(a_pulses == p0 && txd[0] == 0, "forced break holds the line at 0");
    if (a_pulses == p0) mech[M_BREAK]++;
    bw(0, A_FIR_FCR, 8'h73);          // drop the waiting bytes
    bw(0, A_FIR_LCR, 8'h00);
    #10us;
    check(a_pulses == p0, "no frame after the FIFO was cleared");

    // ---- FCR[6] abort in the middle of a frame ----
    br(1, A_FIR_IIR, d);
    bw(0, A_FIR_LCR, 8'h02);
    bw(0, A_FIR_OFDLR0, 8'd30);
    bw(0, A_FIR_OFDLR1, 8'd0);
    for (int i = 0; i < 16; i++) bw(0, A_FIR_TXF, 8'($urandom));
    #45us;                            // preamble and start flag take 36 us
    br(0, A_FIR_IIR, d);
    check(d[IIR_BUSY], "A busy before the abort");
    bw(0, A_FIR_FCR, 8'h73);
    #1us;
    p0 = a_pulses;
    #30us;
    br(0, A_FIR_IIR, d);
    check(a_pulses == p0 && !d[IIR_BUSY], "frame aborted by FCR[6]");
    br(1, A_FIR_IIR, flags);
    check(!flags[IIR_RX_EOF], "no end of frame at B after abort");
    if (a_pulses == p0 && !flags[IIR_RX_EOF]) mech[M_ABORT]++;
    bw(1, A_FIR_FCR, 8'h37);
    bw(0, A_FIR_LCR, 8'h00);

    // ---- frames from the testbench's own generator ----
    bw(1, A_FIR_IER, 8'h04);          // CRC error interrupt
    data = rand_bytes(20);
    fork
      inject(fir_frame(data, 1'b0));
      fir_read(got, flags, 200);
    join
    check(same(got, data) && !flags[IIR_CRC_ERR], "generated frame received");
    if (same(got, data) && !flags[IIR_CRC_ERR]) mech[M_INJ_GOOD]++;
    n = n_irq[1];
    data = rand_bytes(12);
    fork
      inject(fir_frame(data, 1'b1));
      fir_read(got, flags, 200);
    join
    check(flags[IIR_CRC_ERR], "CRC error flagged");
    check(same(got, data), "bytes of a CRC-error frame still delivered");
    check(n_irq[1] > n, "CRC error interrupt");
    if (flags[IIR_CRC_ERR] && n_irq[1] > n) mech[M_CRC_ERR]++;

    // ---- overrun: 30 bytes, nobody reads ----
    data = rand_bytes(30);
    inject(fir_frame(data, 1'b0));
    br(1, A_FIR_IIR, d);
    check(d[IIR_RX_OVR] && d[IIR_RX_EOF], $sformatf("overrun flagged, IIR %02h", d));
    got = {};
    for (int i = 0; i < 16; i++) begin br(1, A_FIR_RXF, d); got.push_back(d); end
    check(got[14] == data[14] && got[15] == data[29] && got[0] == data[0],
          "overrun overwrites the last FIFO entry");
    br(1, A_FIR_IIR, d);
    check(!d[IIR_RX_EOF] && !d[IIR_RX_TRIG], "FIFO drained");
    if (got[15] == data[29]) mech[M_OVERRUN]++;

    // ---- summary ----
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-26s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism never happened: ", mech_name[m]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
