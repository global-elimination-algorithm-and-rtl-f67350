// Current-block memory: N/4 single-port banks of N words x 32 bits (four 16 x 32 banks
// by default) sharing one address. Word a of bank g holds the pixels of rows 4g..4g+3
// of column a, so one full column of the NxN block (N pixels, 128 bits) is written or
// read per cycle. Bank count and size follow the reference chip; the row-to-bank
// mapping is this design's choice. Reads: re with raddr in cycle t, rdata in t+1.
module sram_current_block
  import gea_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(N)-1:0]       waddr,
  input  logic [N-1:0][PIXW-1:0]     wdata,
  input  logic                       re,
  input  logic [$clog2(N)-1:0]       raddr,
  output logic [N-1:0][PIXW-1:0]     rdata
);
  localparam int unsigned NB = N / 4;

  for (genvar g = 0; g < NB; g++) begin : g_bank
    sram_sp #(.DEPTH(N), .WIDTH(4 * PIXW)) u_ram (
      .clk  (clk),
      .we   (we),
      .re   (re),
      .addr (we ? waddr : raddr),
      .wdata(wdata[4*g+:4]),
      .rdata(rdata[4*g+:4])
    );
  end

  initial assert (N % 4 == 0) else $error("N must be a multiple of 4");
endmodule
