// Search-area memory: N single-port banks (RAM00..RAM15) of BANDS*SA_COLS words of one
// pixel each (3 x 48 = 144 x 8 bits by default).
//
// The search area is (2P+N-1) x (2P+N-1) pixels, rows and columns numbered from 0 at
// the top-left (offset -P). Row y lives in bank (y mod N), word (y div N)*SA_COLS + x,
// so any N vertically consecutive pixels of one column sit in N different banks and
// are read in one cycle, each bank with its own address (raddr[k]). The bank outputs
// come out rotated by (top row mod N); the mux network puts them back in row order.
//
// Writes load one "band column" per cycle: the N pixels of rows band*N..band*N+N-1 in
// column wcol, pixel k going to bank k. The bank count and depth follow the reference
// chip; the row-to-bank mapping and the write format are this design's choices.
// Reads: re with raddr in cycle t, rdata valid in cycle t+1. A write takes priority.
module sram_search_area
  import gea_pkg::*;
#(
  parameter int unsigned N       = 16,
  parameter int unsigned P       = 16,
  parameter int unsigned SA_COLS = 2 * P + N,
  parameter int unsigned BANDS   = (2 * P + N - 1 + N - 1) / N,
  parameter int unsigned AW      = $clog2(BANDS * SA_COLS)
) (
  input  logic                               clk,
  input  logic                               we,
  input  logic [$clog2(BANDS)-1:0]           wband,
  input  logic [$clog2(SA_COLS)-1:0]         wcol,
  input  logic [N-1:0][PIXW-1:0]             wdata,
  input  logic                               re,
  input  logic [N-1:0][AW-1:0]               raddr,
  output logic [N-1:0][PIXW-1:0]             rdata
);
  logic [AW-1:0] waddr;
  assign waddr = AW'(wband * SA_COLS + wcol);

  for (genvar k = 0; k < N; k++) begin : g_bank
    sram_sp #(.DEPTH(BANDS * SA_COLS), .WIDTH(PIXW)) u_ram (
      .clk  (clk),
      .we   (we),
      .re   (re),
      .addr (we ? waddr : raddr[k]),
      .wdata(wdata[k]),
      .rdata(rdata[k])
    );
  end
endmodule
