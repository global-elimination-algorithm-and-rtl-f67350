// Testbench of the SAD accumulator: feeds M candidates of N column SADs each (with gaps
// where en is low), and checks the running minimum and its MV after every candidate
// against a direct sum; candidate SADs with ties check that the earlier one is kept.
module tb_sad_accumulator;
  localparam int SW = 16, MVW = 5, N = 16, M = 7;
  logic clk = 0, init = 0, en = 0, first = 0, last = 0;
  logic [SW-1:0] partial = '0;
  logic [2*MVW-1:0] mv = '0, mv_best;
  logic [SW-1:0] sad_min;
  logic updated;
  int checks = 0, failures = 0;

  sad_accumulator #(.SW(SW), .MVW(MVW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int blk = 0; blk < 30; blk++) begin
      int best, bmv;
      best = 32'hFFFF; bmv = 0;
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      for (int c = 0; c < M; c++) begin
        int tot, cmv;
        tot = 0; cmv = $urandom_range(0, 1023);
        for (int i = 0; i < N; i++) begin
          while ($urandom_range(0, 4) == 0) begin en = 0; partial = SW'($urandom); @(negedge clk); end
          en = 1; first = (i == 0); last = (i == N - 1); mv = 10'(cmv);
          partial = SW'((blk % 3 == 0) ? 16 * (c % 2) : $urandom_range(0, 4080));
          tot += int'(partial);
          @(negedge clk);
        end
        en = 0; first = 0; last = 0;
        if (tot < best) begin best = tot; bmv = cmv; end
        checks++;
        if (int'(sad_min) != best || int'(mv_best) != bmv) begin
          failures++;
          $display("FAIL blk %0d cand %0d: %0d/%0d expected %0d/%0d", blk, c, sad_min, mv_best, best, bmv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
