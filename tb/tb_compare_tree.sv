// Testbench of the comparator tree. Streams SSADs (random, many ties from a small value
// range, and invalid cycles) and checks after every cycle that the M stored SSADs and
// MVs equal a reference model of the rule: find the largest of the new value and the
// stored ones; if a stored value equals it, the lowest-numbered such entry takes the
// new value and MV; invalid inputs count as 0xFFFF. The model runs two edges behind
// the input (input register, then replacement). Also checks that init restores 0xFFFF.
module tb_compare_tree;
  localparam int M = 7, SW = 16, MVW = 5;
  logic clk = 0, init = 0, in_valid = 0;
  logic [SW-1:0] ssad = '0;
  logic [2*MVW-1:0] mv_in = '0;
  logic [M-1:0][SW-1:0] ssad_regs;
  logic [M-1:0][2*MVW-1:0] mv_regs;
  logic [M-1:0] replace;
  logic multi_equ;
  int checks = 0, failures = 0, n_multi = 0;

  compare_tree #(.M(M), .SW(SW), .MVW(MVW)) dut (.*);
  always #5 clk = ~clk;

  int rs[M], rm[M];
  int pend_v[$], pend_m[$];

  task automatic model_step(input int v, input int m);
    int mx = v;
    for (int i = 0; i < M; i++) if (rs[i] > mx) mx = rs[i];
    for (int i = 0; i < M; i++) if (rs[i] == mx) begin rs[i] = v; rm[i] = m; break; end
  endtask

  task automatic run(input int len, input int range_hi);
    @(negedge clk);
    init = 1; in_valid = 0;
    for (int i = 0; i < M; i++) begin rs[i] = 16'hFFFF; rm[i] = -1; end
    pend_v.delete(); pend_m.delete();
    @(negedge clk);
    init = 0;
    for (int i = 0; i < M; i++) begin
      checks++;
      if (ssad_regs[i] != 16'hFFFF) begin failures++; $display("FAIL init slot %0d", i); end
    end
    for (int t = 0; t < len + 2; t++) begin
      if (multi_equ && |replace) n_multi++;
      if (t < len) begin
        in_valid = ($urandom_range(0, 5) != 0);
        ssad = SW'($urandom_range(0, range_hi));
        mv_in = 10'(t);
      end else in_valid = 0;
      pend_v.push_back(in_valid ? int'(ssad) : 16'hFFFF);
      pend_m.push_back(int'(mv_in));
      @(negedge clk);
      // value entered two edges ago has now been applied
      if (pend_v.size() == 2) begin
        int v = pend_v.pop_front(), m = pend_m.pop_front();
        model_step(v, m);
        for (int i = 0; i < M; i++) begin
          checks++;
          if (int'(ssad_regs[i]) != rs[i] || (rs[i] != 16'hFFFF && int'(mv_regs[i]) != rm[i])) begin
            failures++;
            $display("FAIL t=%0d slot %0d: %0d/%0d expected %0d/%0d", t, i, ssad_regs[i], mv_regs[i], rs[i], rm[i]);
          end
        end
      end
    end
  endtask

  initial begin
    run(300, 65000);
    run(300, 12);
    run(50, 3);
    checks++;
    if (n_multi == 0) begin failures++; $display("FAIL no tie seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
