// Current-block subblock-sum registers (csum00..csum33). They capture the NS subblock
// sums of the current block from the systolic part once per macroblock (load high for
// one cycle) and hold them as the fixed operand of the SSAD computation while the
// search area streams through the systolic part.
module csum_registers #(
  parameter int unsigned NS = 16,
  parameter int unsigned SW = 12
) (
  input  logic                  clk,
  input  logic                  load,
  input  logic [NS-1:0][SW-1:0] d,
  output logic [NS-1:0][SW-1:0] q
);
  always_ff @(posedge clk) begin
    if (load) q <= d;
  end
endmodule
