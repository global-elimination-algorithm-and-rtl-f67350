// Single-port synchronous SRAM model (written as an array, synthesizes to a memory).
// One access per cycle: when we is high the word at addr is written, otherwise when re
// is high the word at addr appears on rdata after the clock edge (one-cycle read
// latency); rdata holds its value while re is low. Used for every on-chip buffer of
// the core: the search-area banks (144 x 8) and the current-block banks (16 x 32).
module sram_sp #(
  parameter int unsigned DEPTH = 144,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
    end else if (re) begin
      rdata <= mem[addr];
    end
  end
endmodule
