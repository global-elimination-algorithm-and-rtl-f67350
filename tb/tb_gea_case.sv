// Reusable end-to-end test of the GEA core for one configuration (search range P,
// candidate count M; N = 16 with 4x4 subblocks). It runs NBLK macroblocks, each a block
// cut from a random-textured search area with a little noise, checks the comparator's M
// candidates, the final MV and SAD against a reference model, and the latency
// N + 2P(2P+N-1) + MN + 5. Results are reported on its outputs; tb_gea_workloads
// instantiates it once per evaluated configuration.
module tb_gea_case #(
  parameter int P = 16,
  parameter int M = 7,
  parameter int NBLK = 2
) (
  output bit finished,
  output int checks,
  output int failures,
  output int same_as_fs
);
  localparam int N = 16, SB = 4, NU = N / SB;
  localparam int W = 2 * P + N - 1;
  localparam int SA_COLS = 2 * P + N;
  localparam int BANDS = (W + N - 1) / N;
  localparam int MVW = $clog2(2 * P);
  localparam int LAT = N + 2 * P * W + M * N + 5;

  logic clk = 0, rst_n = 0;
  logic cur_we = 0, sa_we = 0, start = 0;
  logic [3:0] cur_waddr = 0;
  logic [N-1:0][7:0] cur_wdata = '0, sa_wdata = '0;
  logic [$clog2(BANDS)-1:0] sa_wband = 0;
  logic [$clog2(SA_COLS)-1:0] sa_wcol = 0, sa_col_base = 0;
  logic busy, done;
  logic signed [MVW-1:0] mv_x, mv_y;
  logic [15:0] sad_min;

  gea_me #(.P(P), .M(M)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // loop bounds held in variables so the simulator does not unroll the model loops
  int nu_rt = NU, sb_rt = SB, n_rt = N;
  int cur[N][N];
  int sa[W][W];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (P=%0d M=%0d): %s", P, M, what);
    end
  endtask

  function automatic int ssad_at(int mp, int np);
    int s = 0;
    for (int u = 0; u < nu_rt; u++)
      for (int g = 0; g < nu_rt; g++) begin
        int cs = 0, rs = 0;
        for (int r = 0; r < sb_rt; r++)
          for (int c = 0; c < sb_rt; c++) begin
            cs += cur[u * SB + r][g * SB + c];
            rs += sa[np + u * SB + r][mp + g * SB + c];
          end
        s += (cs > rs) ? cs - rs : rs - cs;
      end
    return s;
  endfunction

  function automatic int sad_at(int mp, int np);
    int s = 0;
    for (int r = 0; r < n_rt; r++)
      for (int c = 0; c < n_rt; c++) begin
        int d = cur[r][c] - sa[np + r][mp + c];
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  task automatic run_block(input int k);
    int rs[M], rmx[M], rmy[M];
    int best, bx, by, fs, t0, dx, dy;
    dx = $urandom_range(0, 2 * P - 1);
    dy = $urandom_range(0, 2 * P - 1);
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) sa[y][x] = 100 + 50 * (((x / 5) ^ (y / 3)) % 3) + $urandom_range(0, 40);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) cur[r][c] = sa[dy + r][dx + c] + $urandom_range(0, 4);
    // load
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      cur_we = 1; cur_waddr = 4'(c);
      for (int r = 0; r < N; r++) cur_wdata[r] = 8'(cur[r][c]);
    end
    for (int b = 0; b < BANDS; b++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        cur_we = 0; sa_we = 1; sa_wband = $bits(sa_wband)'(b); sa_wcol = $bits(sa_wcol)'(x);
        for (int i = 0; i < N; i++) sa_wdata[i] = (b * N + i < W) ? 8'(sa[b * N + i][x]) : 8'h00;
      end
    @(negedge clk);
    sa_we = 0;
    // reference
    for (int i = 0; i < M; i++) begin rs[i] = 16'hFFFF; rmx[i] = 0; rmy[i] = 0; end
    for (int np = 0; np < 2 * P; np++)
      for (int mp = 0; mp < 2 * P; mp++) begin
        int v, mx;
        v = ssad_at(mp, np); mx = v;
        for (int i = 0; i < M; i++) if (rs[i] > mx) mx = rs[i];
        for (int i = 0; i < M; i++)
          if (rs[i] == mx) begin rs[i] = v; rmx[i] = mp - P; rmy[i] = np - P; break; end
      end
    best = 32'h7fffffff; bx = 0; by = 0;
    for (int i = 0; i < M; i++) begin
      int s;
      s = sad_at(rmx[i] + P, rmy[i] + P);
      if (s < best) begin best = s; bx = rmx[i]; by = rmy[i]; end
    end
    fs = 32'h7fffffff;
    for (int np = 0; np < 2 * P; np++)
      for (int mp = 0; mp < 2 * P; mp++) begin
        int s;
        s = sad_at(mp, np);
        if (s < fs) fs = s;
      end
    // run
    @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(cyc - t0 == LAT, $sformatf("block %0d latency %0d expected %0d", k, cyc - t0, LAT));
    for (int i = 0; i < M; i++)
      check(int'(dut.cand_ssad[i]) == rs[i], $sformatf("block %0d slot %0d SSAD", k, i));
    check(int'(mv_x) == bx && int'(mv_y) == by, $sformatf("block %0d MV (%0d,%0d) expected (%0d,%0d)", k, int'(mv_x), int'(mv_y), bx, by));
    check(int'(sad_min) == best, $sformatf("block %0d SAD %0d expected %0d", k, sad_min, best));
    if (best == fs) same_as_fs++;
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; same_as_fs = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NBLK; k++) run_block(k);
    $display("P=%0d M=%0d: %0d blocks, latency %0d cycles, same SAD as full search in %0d", P, M, NBLK, LAT, same_as_fs);
    finished = 1;
  end
endmodule
