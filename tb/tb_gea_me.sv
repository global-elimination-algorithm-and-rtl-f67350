// End-to-end testbench of the GEA core at its default sizes (16x16 block, [-16,+15],
// 4x4 subblocks, M = 7). For several macroblocks it loads a current block and a search
// area, runs the core and checks against a reference model written independently here:
//   - the M SSADs (and their MVs) left in the comparator, slot by slot, from a direct
//     model of the keep-the-M-smallest replacement rule;
//   - the final MV and SAD (smallest true SAD among those M candidates, earlier slot
//     wins ties);
//   - the latency: done N + 2P(2P+N-1) + MN + 5 cycles after start.
// Scenes: random pixels, a block cut out of the search area with noise, smooth
// gradients, and flat images (all SSADs equal, exercising the tie rule of CHECK), each
// loaded whole at a random column offset; then a strip of horizontally adjacent
// macroblocks where each one after the first loads only its N new search-area columns.
// It also counts how often each mechanism fired (bubble SSADs forced to 0xFFFF, csum
// capture, replacements, multi-EQU ties, rejected SSADs, SAD_min updates) and fails if
// one never did. It reports how often the result equals full search.
module tb_gea_me;
  import gea_pkg::*;
  localparam int N = 16, P = 16, SB = 4, M = 7;
  localparam int W = 2 * P + N - 1;
  localparam int NU = N / SB;
  localparam int LAT = N + 2 * P * (2 * P + N - 1) + M * N + 5;
  localparam int NBLK = 10;

  logic clk = 0, rst_n = 0;
  logic cur_we = 0, sa_we = 0, start = 0;
  logic [3:0] cur_waddr = 0;
  logic [N-1:0][7:0] cur_wdata = '0, sa_wdata = '0;
  logic [1:0] sa_wband = 0;
  logic [5:0] sa_wcol = 0, sa_col_base = 0;
  logic busy, done;
  logic signed [4:0] mv_x, mv_y;
  logic [15:0] sad_min;

  gea_me dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_bubble = 0, n_csum = 0, n_replace = 0, n_multi = 0, n_reject = 0, n_sadupd = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.bubble) n_bubble++;
    if (dut.csum_load) n_csum++;
    if (|dut.replace && dut.u_cmp.ssad_in_reg != 16'hFFFF) n_replace++;
    if (dut.multi_equ && |dut.replace && dut.u_cmp.ssad_in_reg != 16'hFFFF) n_multi++;
    if (!(|dut.replace) && dut.u_cmp.ssad_in_reg != 16'hFFFF) n_reject++;
    if (dut.sad_updated) n_sadupd++;
  end

  // loop bounds held in variables so the simulator does not unroll the model loops
  int nu_rt = NU, sb_rt = SB, n_rt = N;
  int cur[N][N];     // [row][col]
  int sa[W][W];      // [row][col], index 0 = offset -P
  localparam int SA_COLS = 2 * P + N;
  localparam int KSTRIP = 5;                       // macroblocks in a horizontal strip
  localparam int SW_ = W + N * (KSTRIP - 1);       // strip width in pixels
  int strip[W][SW_];
  int n_reuse = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int pix(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic make_scene(input int kind);
    int dx, dy;
    dx = $urandom_range(0, 2 * P - 1);
    dy = $urandom_range(0, 2 * P - 1);
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++)
        case (kind)
          0, 1: sa[y][x] = $urandom_range(0, 255);
          2: sa[y][x] = pix(3 * x + 2 * y + $urandom_range(0, 8));
          default: sa[y][x] = 77;
        endcase
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        case (kind)
          0: cur[r][c] = $urandom_range(0, 255);
          1, 2: cur[r][c] = pix(sa[dy + r][dx + c] + int'($urandom_range(0, 6)) - 3);
          default: cur[r][c] = 77;
        endcase
  endtask

  // Loads the current block and search-area columns first_col..W-1, search-area column x
  // going to memory column (base + x) mod SA_COLS.
  task automatic load(input int first_col, input int base);
    sa_col_base = 6'(base);
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      cur_we = 1; cur_waddr = 4'(c);
      for (int r = 0; r < N; r++) cur_wdata[r] = 8'(cur[r][c]);
    end
    for (int b = 0; b < 3; b++)
      for (int x = first_col; x < W; x++) begin
        @(negedge clk);
        cur_we = 0; sa_we = 1; sa_wband = 2'(b); sa_wcol = 6'((base + x) % SA_COLS);
        for (int i = 0; i < N; i++) sa_wdata[i] = (b * N + i < W) ? 8'(sa[b * N + i][x]) : 8'h00;
      end
    @(negedge clk);
    cur_we = 0; sa_we = 0;
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

  int same_as_fs = 0;

  // kind 0..3: independent scene, fully loaded at a random base; kind 4: macroblock
  // number pos of the strip, loading only its N new columns when pos > 0.
  task automatic run_block(input int k, input int kind, input int pos = 0);
    int rs[M], rmx[M], rmy[M];
    int best, bx, by, fs, t0, t1;
    if (kind < 4) begin
      make_scene(kind);
      load(0, $urandom_range(0, SA_COLS - 1));
    end else begin
      int dx, dy;
      dx = $urandom_range(0, 2 * P - 1);
      dy = $urandom_range(0, 2 * P - 1);
      for (int y = 0; y < W; y++)
        for (int x = 0; x < W; x++) sa[y][x] = strip[y][pos * N + x];
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) cur[r][c] = pix(sa[dy + r][dx + c] + int'($urandom_range(0, 4)) - 2);
      if (pos == 0) load(0, 0);
      else begin
        load(W - N, (pos * N) % SA_COLS);
        n_reuse++;
      end
    end
    // reference: comparator model in raster order
    for (int i = 0; i < M; i++) begin rs[i] = 16'hFFFF; rmx[i] = 0; rmy[i] = 0; end
    for (int np = 0; np < 2 * P; np++)
      for (int mp = 0; mp < 2 * P; mp++) begin
        int v = ssad_at(mp, np), mx = v;
        for (int i = 0; i < M; i++) if (rs[i] > mx) mx = rs[i];
        for (int i = 0; i < M; i++)
          if (rs[i] == mx) begin rs[i] = v; rmx[i] = mp - P; rmy[i] = np - P; break; end
      end
    best = 32'h7fffffff; bx = 0; by = 0;
    for (int i = 0; i < M; i++) begin
      int s = sad_at(rmx[i] + P, rmy[i] + P);
      if (s < best) begin best = s; bx = rmx[i]; by = rmy[i]; end
    end
    fs = 32'h7fffffff;
    for (int np = 0; np < 2 * P; np++)
      for (int mp = 0; mp < 2 * P; mp++) begin
        int s = sad_at(mp, np);
        if (s < fs) fs = s;
      end
    // run
    @(negedge clk);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = cyc;
    check(t1 - t0 == LAT, $sformatf("block %0d latency %0d expected %0d", k, t1 - t0, LAT));
    for (int i = 0; i < M; i++) begin
      check(int'(dut.cand_ssad[i]) == rs[i], $sformatf("block %0d slot %0d SSAD %0d expected %0d", k, i, dut.cand_ssad[i], rs[i]));
      if (kind != 3) begin
        check(int'($signed(dut.cand_mv[i][9:5])) == rmx[i] && int'($signed(dut.cand_mv[i][4:0])) == rmy[i],
              $sformatf("block %0d slot %0d mv", k, i));
      end
    end
    check(int'(mv_x) == bx && int'(mv_y) == by,
          $sformatf("block %0d MV (%0d,%0d) expected (%0d,%0d)", k, mv_x, mv_y, bx, by));
    check(int'(sad_min) == best, $sformatf("block %0d SAD %0d expected %0d", k, sad_min, best));
    if (best == fs) same_as_fs++;
    $display("block %0d kind %0d: MV (%0d,%0d) SAD %0d, full-search SAD %0d", k, kind, int'(mv_x), int'(mv_y), sad_min, fs);
    @(negedge clk);
    check(!done && !busy, "done is a single pulse");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NBLK; k++) run_block(k, (k < 3) ? k : (k == 3 ? 3 : 1 + (k % 2)));
    // a strip of KSTRIP horizontally adjacent macroblocks sharing search-area columns
    for (int y = 0; y < W; y++)
      for (int x = 0; x < SW_; x++) strip[y][x] = pix(128 + 60 * ((x / 9 + y / 7) % 3 - 1) + $urandom_range(0, 30));
    for (int k = 0; k < KSTRIP; k++) run_block(NBLK + k, 4, k);
    check(n_bubble > 0, "no bubble SSAD cycle");
    check(n_csum == NBLK + KSTRIP, "csum capture once per block");
    check(n_reuse == KSTRIP - 1, "search-area reuse loads");
    check(n_replace > 0, "no replacement");
    check(n_multi > 0, "no multi-EQU tie");
    check(n_reject > 0, "no rejected SSAD");
    check(n_sadupd > 0, "no SAD_min update");
    $display("mechanisms: bubble=%0d csum=%0d replace=%0d multi_equ=%0d reject=%0d sad_update=%0d reuse=%0d; same SAD as full search %0d/%0d",
             n_bubble, n_csum, n_replace, n_multi, n_reject, n_sadupd, n_reuse, same_as_fs, NBLK + KSTRIP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * ((NBLK + KSTRIP) * (LAT + 400) + 1000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
