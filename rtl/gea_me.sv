// GEA block-matching motion-estimation core (global elimination algorithm).
//
// For one NxN current block and a [-P, P-1] search range the core first computes, for
// all (2P)^2 search positions in raster order, a subsampled SAD (SSAD): the sum over the
// (N/SB)^2 subblocks of |current subblock sum - candidate subblock sum|. A comparator
// tree keeps the M positions with the smallest SSAD. Then the true SAD of only these M
// candidates is computed and the one with the smallest SAD gives the motion vector.
// Defaults: N = 16, P = 16 ([-16,+15]), SB = 4 (level 3: sixteen 4x4 subblocks), M = 7.
//
// Datapath: current-block memory and search-area memory (N banks) -> MUX A / mux network
// 1 -> systolic part (subblock sums of a sliding N-column window, one column per cycle)
// -> csum registers (current block) and rsum (candidate) -> MUX B/C -> SAD tree -> either
// the comparator tree (SSAD pass) or the SAD accumulator (SAD pass, operands are a
// current column and a candidate column via mux network 2).
//
// Interface: load the memories while busy is low. cur_we writes column cur_waddr of the
// current block (pixel i = row i). sa_we writes, for the search area whose top-left
// pixel is at offset (-P,-P) from the block, the N pixels of rows sa_wband*N..+N-1 of
// one column (pixel i = row sa_wband*N+i) into memory column sa_wcol. Search-area column
// x is expected in memory column (sa_col_base + x) mod SA_COLS, sa_col_base being sampled
// with start: for the next macroblock to the right, add N to sa_col_base and write only
// the N new columns (search-area data reuse). Pulse start; done pulses for one cycle
// N + 2P(2P+N-1) + MN + 5 cycles later (1637 by default) with mv_x, mv_y (signed, in
// [-P, P-1]) and sad_min, which hold until the next start. The schedule and structure
// follow the reference architecture; the load interface, the handshake and the exact
// pipeline depth are this design's.
module gea_me
  import gea_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned P  = 16,
  parameter int unsigned SB = 4,
  parameter int unsigned M  = 7,
  localparam int unsigned W       = 2 * P + N - 1,
  localparam int unsigned SA_COLS = 2 * P + N,
  localparam int unsigned BANDS   = (W + N - 1) / N,
  localparam int unsigned AW      = $clog2(BANDS * SA_COLS),
  localparam int unsigned MVW     = mv_width(P),
  localparam int unsigned NW      = $clog2(N),
  localparam int unsigned SUBW    = subsum_width(SB),
  localparam int unsigned SADW    = sad_width(N)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // memory loading
  input  logic                         cur_we,
  input  logic [NW-1:0]                cur_waddr,
  input  logic [N-1:0][PIXW-1:0]       cur_wdata,
  input  logic                         sa_we,
  input  logic [$clog2(BANDS)-1:0]     sa_wband,
  input  logic [$clog2(SA_COLS)-1:0]   sa_wcol,
  input  logic [N-1:0][PIXW-1:0]       sa_wdata,
  // operation
  input  logic                         start,
  input  logic [$clog2(SA_COLS)-1:0]   sa_col_base,
  output logic                         busy,
  output logic                         done,
  output logic signed [MVW-1:0]        mv_x,
  output logic signed [MVW-1:0]        mv_y,
  output logic [SADW-1:0]              sad_min
);
  logic                      init, cur_re, sa_re;
  logic [NW-1:0]             cur_raddr;
  logic [N-1:0][AW-1:0]      sa_raddr;
  logic                      sel_cur, sys_shift, sad_mode;
  logic [NW-1:0]             rot1, rot2;
  logic                      acc_en, acc_first, acc_last, csum_load, ssad_valid, bubble;
  logic [2*MVW-1:0]          acc_mv, ssad_mv, mv_best;
  logic [M-1:0][2*MVW-1:0]   cand_mv;
  logic [M-1:0][SADW-1:0]    cand_ssad;
  logic [M-1:0]              replace;
  // bubble, cand_ssad, replace, multi_equ and sad_updated drive no logic here; they
  // are kept as named observation points for verification.
  logic                      multi_equ, sad_updated;

  logic [N-1:0][PIXW-1:0]    cur_col, sa_bank, sa_col1, sa_col2, sys_in;
  logic [N-1:0][SUBW-1:0]    rsum, csum, tree_a, tree_b;
  logic [SADW-1:0]           tree_sum;

  control_unit #(.N(N), .P(P), .M(M)) u_ctrl (
    .clk, .rst_n, .start, .col_base(sa_col_base), .busy, .done, .init,
    .cur_re, .cur_raddr, .sa_re, .sa_raddr,
    .sel_cur, .sys_shift, .rot1, .rot2, .sad_mode,
    .acc_en, .acc_first, .acc_last, .acc_mv,
    .csum_load, .ssad_valid, .ssad_mv, .cand_mv, .bubble
  );

  sram_current_block #(.N(N)) u_cur_mem (
    .clk, .we(cur_we), .waddr(cur_waddr), .wdata(cur_wdata),
    .re(cur_re), .raddr(cur_raddr), .rdata(cur_col)
  );

  sram_search_area #(.N(N), .P(P)) u_sa_mem (
    .clk, .we(sa_we), .wband(sa_wband), .wcol(sa_wcol), .wdata(sa_wdata),
    .re(sa_re), .raddr(sa_raddr), .rdata(sa_bank)
  );

  mux_network #(.N(N)) u_mux_net1 (.din(sa_bank), .rot(rot1), .dout(sa_col1));
  mux_network #(.N(N)) u_mux_net2 (.din(sa_bank), .rot(rot2), .dout(sa_col2));

  operand_muxes #(.N(N), .SW(SUBW)) u_muxes (
    .sel_cur, .sad_mode, .cur_col, .sa_col1, .sa_col2, .csum, .rsum,
    .sys_in, .tree_a, .tree_b
  );

  systolic_part #(.N(N), .SB(SB)) u_systolic (
    .clk, .shift(sys_shift), .col_in(sys_in), .sum(rsum)
  );

  csum_registers #(.NS(N), .SW(SUBW)) u_csum (
    .clk, .load(csum_load), .d(rsum), .q(csum)
  );

  sad_tree #(.NL(N), .IW(SUBW), .OW(SADW)) u_sad_tree (
    .a(tree_a), .b(tree_b), .sum(tree_sum)
  );

  compare_tree #(.M(M), .SW(SADW), .MVW(MVW)) u_cmp (
    .clk, .init, .in_valid(ssad_valid), .ssad(tree_sum), .mv_in(ssad_mv),
    .ssad_regs(cand_ssad), .mv_regs(cand_mv), .replace, .multi_equ
  );

  sad_accumulator #(.SW(SADW), .MVW(MVW)) u_acc (
    .clk, .init, .en(acc_en), .first(acc_first), .last(acc_last),
    .partial(tree_sum), .mv(acc_mv), .sad_min, .mv_best, .updated(sad_updated)
  );

  assign mv_x = mv_best[2*MVW-1:MVW];
  assign mv_y = mv_best[MVW-1:0];

  // The SAD tree is shared by both passes only when it has one lane per pixel row.
  initial assert ((N / SB) * (N / SB) == N) else $error("(N/SB)^2 must equal N");

  // Memories are single-port: no loading while a block is being processed.
  always_ff @(posedge clk) begin
    assert (!(busy && (cur_we || sa_we))) else $error("memory write while busy");
  end
endmodule
