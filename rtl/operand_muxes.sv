// Datapath multiplexers A, B and C around the systolic part and the SAD tree.
//   MUX A: feeds the systolic part with a current-block column (sel_cur = 1) or with a
//          row-ordered search-area column from mux network 1.
//   MUX B: first SAD-tree operand: the stored csum registers (SSAD pass) or the pixels
//          of a current-block column (SAD pass, sad_mode = 1).
//   MUX C: second SAD-tree operand: the candidate subblock sums rsum from the systolic
//          part (SSAD pass) or a search-area column from mux network 2 (SAD pass).
// In the SAD pass the N pixels occupy the N lanes of the tree and are zero-extended to
// the SW-bit lane width. This relies on the lane count NL = (N/SB)^2 being equal to N,
// true for N = 16 with 4x4 subblocks. Purely combinational.
module operand_muxes
  import gea_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned SW = 12
) (
  input  logic                     sel_cur,
  input  logic                     sad_mode,
  input  logic [N-1:0][PIXW-1:0]   cur_col,
  input  logic [N-1:0][PIXW-1:0]   sa_col1,
  input  logic [N-1:0][PIXW-1:0]   sa_col2,
  input  logic [N-1:0][SW-1:0]     csum,
  input  logic [N-1:0][SW-1:0]     rsum,
  output logic [N-1:0][PIXW-1:0]   sys_in,
  output logic [N-1:0][SW-1:0]     tree_a,
  output logic [N-1:0][SW-1:0]     tree_b
);
  always_comb begin
    sys_in = sel_cur ? cur_col : sa_col1;
    for (int i = 0; i < N; i++) begin
      tree_a[i] = sad_mode ? SW'(cur_col[i]) : csum[i];
      tree_b[i] = sad_mode ? SW'(sa_col2[i]) : rsum[i];
    end
  end
endmodule
