// Systolic part: computes the sums of all SBxSB subblocks of the last N columns of
// pixels that were shifted in, one new column of N pixels per cycle.
//
// The N input rows are split into NU = N/SB units of SB rows. Each unit adds its SB
// pixels of the incoming column (8 -> 10 bits for SB = 4) and pushes that column sum
// into an N-stage shift register. The register is read as NU groups of SB stages; the
// sum of a group (12 bits) is the sum of one SBxSB subblock. Group 0 holds the oldest
// SB columns, so after columns j..j+N-1 have been shifted in, sum[u*NU+g] is the sum of
// the subblock in rows u*SB..u*SB+SB-1 and columns j+g*SB..j+g*SB+SB-1 of the window.
// With N = 16 and SB = 4 this is the four-unit, sixteen-output array of the reference
// design. Timing: col_in is captured on the clock edge when shift is high; sum is
// combinational from the registers and is valid in the cycle after the N-th column
// of a window entered. The shift registers are not reset (they only carry data).
module systolic_part
  import gea_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned SB = 4,
  localparam int unsigned NU = N / SB,
  localparam int unsigned CW = PIXW + $clog2(SB),
  localparam int unsigned SW = subsum_width(SB)
) (
  input  logic                        clk,
  input  logic                        shift,
  input  logic [N-1:0][PIXW-1:0]      col_in,
  output logic [NU*NU-1:0][SW-1:0]    sum
);
  // sreg[u][0] is the newest column sum, sreg[u][N-1] the oldest.
  logic [NU-1:0][N-1:0][CW-1:0] sreg;
  logic [NU-1:0][CW-1:0]        colsum;

  always_comb begin
    for (int u = 0; u < NU; u++) begin
      colsum[u] = '0;
      for (int r = 0; r < SB; r++) begin
        colsum[u] = colsum[u] + CW'(col_in[u*SB+r]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int u = 0; u < NU; u++) begin
        sreg[u] <= {sreg[u][N-2:0], colsum[u]};
      end
    end
  end

  always_comb begin
    for (int u = 0; u < NU; u++) begin
      for (int g = 0; g < NU; g++) begin
        sum[u*NU+g] = '0;
        for (int c = 0; c < SB; c++) begin
          // group g covers window columns g*SB..g*SB+SB-1, i.e. stages N-1-(g*SB+c)
          sum[u*NU+g] = sum[u*NU+g] + SW'(sreg[u][N-1-(g*SB+c)]);
        end
      end
    end
  end
endmodule
