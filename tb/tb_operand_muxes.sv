// Testbench of multiplexers A, B and C: random operands and all select combinations;
// pixel operands must appear zero-extended in the SAD-tree lanes.
module tb_operand_muxes;
  localparam int N = 16, SW = 12;
  logic sel_cur, sad_mode;
  logic [N-1:0][7:0] cur_col, sa_col1, sa_col2, sys_in;
  logic [N-1:0][SW-1:0] csum, rsum, tree_a, tree_b;
  int checks = 0, failures = 0;

  operand_muxes #(.N(N), .SW(SW)) dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      sel_cur = 1'($urandom); sad_mode = 1'($urandom);
      for (int i = 0; i < N; i++) begin
        cur_col[i] = 8'($urandom); sa_col1[i] = 8'($urandom); sa_col2[i] = 8'($urandom);
        csum[i] = SW'($urandom); rsum[i] = SW'($urandom);
      end
      #1;
      checks++;
      if (sys_in != (sel_cur ? cur_col : sa_col1)) begin failures++; $display("FAIL mux A"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (tree_a[i] != (sad_mode ? {4'h0, cur_col[i]} : csum[i]) ||
            tree_b[i] != (sad_mode ? {4'h0, sa_col2[i]} : rsum[i])) begin
          failures++; $display("FAIL mux B/C lane %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
