// Parallel adder tree ("SAD tree"): NL absolute-difference units (AD00..AD33) followed
// by a binary tree of adders, log2(NL) levels deep. Output = sum over lanes |a - b|.
// It serves both passes: with the 16 current/candidate subblock sums it gives the
// subsampled SAD (SSAD) of one search position per cycle, and with 16 current/search
// pixels of one column it gives a column SAD, accumulated over N cycles elsewhere.
// Purely combinational; NL must be a power of two.
module sad_tree #(
  parameter int unsigned NL = 16,
  parameter int unsigned IW = 12,
  parameter int unsigned OW = 16
) (
  input  logic [NL-1:0][IW-1:0] a,
  input  logic [NL-1:0][IW-1:0] b,
  output logic [OW-1:0]         sum
);
  localparam int unsigned LV = $clog2(NL);

  // node[l][i]: i-th node of level l; level 0 holds the absolute differences.
  logic [LV:0][NL-1:0][OW-1:0] node;

  always_comb begin
    node = '0;
    for (int i = 0; i < NL; i++) begin
      node[0][i] = (a[i] >= b[i]) ? OW'(a[i] - b[i]) : OW'(b[i] - a[i]);
    end
    for (int l = 1; l <= LV; l++) begin
      for (int i = 0; i < (NL >> l); i++) begin
        node[l][i] = node[l-1][2*i] + node[l-1][2*i+1];
      end
    end
    sum = node[LV][0];
  end

  initial assert (NL == (1 << LV)) else $error("NL must be a power of two");
endmodule
