// Testbench of the control unit at default sizes. With random candidate MVs on its
// input it runs two macroblocks and checks, cycle by cycle, the whole schedule against
// an independent model: current-block read addresses 0..N-1; for the search pass every
// per-bank address (bank k reads row n'+((k-n') mod N) of column x'), the rotation
// one cycle later, the SSAD valid flags and MVs in raster order two cycles later and
// the N-1 bubble cycles per row; the csum capture; in the SAD pass the addresses of each
// candidate's N columns and the accumulator controls; the circular column offset
// col_base (random per block, held after start); and done at
// N + 2P(2P+N-1) + MN + 5 cycles after start.
module tb_control_unit;
  localparam int N = 16, P = 16, M = 7, W = 2 * P + N - 1, SA_COLS = 2 * P + N;
  localparam int LAT = N + 2 * P * W + M * N + 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] col_base = '0;
  int base_s = 0;
  logic busy, done, init, cur_re, sa_re, sel_cur, sys_shift, sad_mode;
  logic acc_en, acc_first, acc_last, csum_load, ssad_valid, bubble;
  logic [3:0] cur_raddr, rot1, rot2;
  logic [N-1:0][7:0] sa_raddr;
  logic [9:0] acc_mv, ssad_mv;
  logic [M-1:0][9:0] cand_mv;
  int checks = 0, failures = 0;

  control_unit #(.N(N), .P(P), .M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  function automatic logic [7:0] addr_of(int top, int x, int k);
    int row = top + ((k - top) % N + N) % N;
    return 8'((row / N) * SA_COLS + (base_s + x) % SA_COLS);
  endfunction

  // expected schedule, indexed by cycle after the start cycle (1 = first issue)
  task automatic run_block();
    int t = 0, nvalid = 0, nbub = 0, ncsum = 0, nacc = 0, last_cur_t = -1;
    @(negedge clk);
    for (int i = 0; i < M; i++) cand_mv[i] = 10'($urandom);
    start = 1;
    col_base = 6'($urandom_range(0, SA_COLS - 1));
    base_s = int'(col_base);
    #1 chk(init, "init with start");
    @(negedge clk);
    start = 0;
    col_base = 6'($urandom);
    for (t = 1; t <= LAT; t++) begin
      // issue-cycle checks
      if (t <= N) begin
        chk(cur_re && !sa_re && int'(cur_raddr) == t - 1, $sformatf("t=%0d cur read", t));
      end else if (t <= N + 2 * P * W) begin
        int j = t - N - 1, np = j / W, x = j % W;
        chk(sa_re && !cur_re, $sformatf("t=%0d sa read", t));
        for (int k = 0; k < N; k++)
          chk(sa_raddr[k] == addr_of(np, x, k), $sformatf("t=%0d bank %0d addr %0d", t, k, sa_raddr[k]));
      end else if (t >= N + 2 * P * W + 4 && t < N + 2 * P * W + 4 + M * N) begin
        int j = t - (N + 2 * P * W + 4), c = j / N, i = j % N;
        int cx = int'($signed(cand_mv[c][9:5])) + P, cy = int'($signed(cand_mv[c][4:0])) + P;
        chk(sa_re && cur_re && int'(cur_raddr) == i, $sformatf("t=%0d sad read", t));
        for (int k = 0; k < N; k++)
          chk(sa_raddr[k] == addr_of(cy, cx + i, k), $sformatf("t=%0d sad bank %0d", t, k));
      end else begin
        chk(!sa_re && !cur_re, $sformatf("t=%0d idle read", t));
      end
      // data-cycle checks (one cycle after the issue)
      if (t >= 2 && t <= N + 1) chk(sel_cur && sys_shift, $sformatf("t=%0d sel_cur", t));
      if (t > N + 1 && t <= N + 2 * P * W + 1) begin
        int j = t - N - 2;
        chk(!sel_cur && sys_shift && int'(rot1) == (j / W) % N, $sformatf("t=%0d rot1", t));
      end
      if (sel_cur) last_cur_t = t;
      if (csum_load) begin ncsum++; chk(t == last_cur_t + 1, "csum load time"); end
      // SSAD cycle (two after the issue)
      if (bubble) nbub++;
      if (ssad_valid) begin
        int ex = nvalid % (2 * P) - P, ey = nvalid / (2 * P) - P;
        chk(int'($signed(ssad_mv[9:5])) == ex && int'($signed(ssad_mv[4:0])) == ey,
            $sformatf("t=%0d ssad mv", t));
        chk(t == N + 3 + (nvalid / (2 * P)) * W + (N - 1) + nvalid % (2 * P), $sformatf("t=%0d ssad time", t));
        nvalid++;
      end
      if (acc_en) begin
        int c = nacc / N, i = nacc % N;
        int cy = int'($signed(cand_mv[c][4:0])) + P;
        chk(sad_mode && acc_first == (i == 0) && acc_last == (i == N - 1) && acc_mv == cand_mv[c]
            && int'(rot2) == cy % N, $sformatf("t=%0d acc ctl", t));
        nacc++;
      end
      chk(busy, "busy");
      if (t < LAT) chk(!done, $sformatf("t=%0d early done", t));
      else chk(done, "done at latency");
      @(negedge clk);
    end
    chk(!done && !busy, "back to idle");
    chk(nvalid == 4 * P * P, $sformatf("valid SSAD count %0d", nvalid));
    chk(nbub == 2 * P * (N - 1), $sformatf("bubble count %0d", nbub));
    chk(ncsum == 1, "one csum load");
    chk(nacc == M * N, "accumulate count");
  endtask

  initial begin
    cand_mv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_block();
    repeat (3) @(negedge clk);
    run_block();
    repeat (3) @(negedge clk);
    run_block();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
