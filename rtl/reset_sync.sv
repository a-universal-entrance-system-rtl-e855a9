// reset_sync: reset synchroniser for one clock domain.
//
// Asserts `rst_out_n` asynchronously with `rst_in_n` and releases it two
// clocks of `clk` after `rst_in_n` rises, so every flop of the domain leaves
// reset on the same edge. Used once per clock domain of the core; this is a
// design choice, the document does not describe reset.
module reset_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);
  logic r1;
  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) begin
      r1        <= 1'b0;
      rst_out_n <= 1'b0;
    end else begin
      r1        <= 1'b1;
      rst_out_n <= r1;
    end
  end
endmodule
