// Testbench of the systolic part: streams random columns (with idle cycles where shift
// is low) and, whenever at least N columns have entered, checks all (N/SB)^2 outputs
// against subblock sums computed directly from the last N columns. Includes an
// all-255 window to check the 12-bit sums do not overflow.
module tb_systolic_part;
  localparam int N = 16, SB = 4, NU = N / SB;
  logic clk = 0, shift = 0;
  logic [N-1:0][7:0] col_in = '0;
  logic [NU*NU-1:0][11:0] sum;
  int checks = 0, failures = 0;
  int cols[$][N];

  systolic_part #(.N(N), .SB(SB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // check outputs for the window of the last N columns
      if (cols.size() >= N) begin
        for (int u = 0; u < NU; u++)
          for (int g = 0; g < NU; g++) begin
            int s;
            s = 0;
            for (int r = 0; r < SB; r++)
              for (int c = 0; c < SB; c++)
                s += cols[cols.size() - N + g * SB + c][u * SB + r];
            checks++;
            if (int'(sum[u * NU + g]) != s) begin
              failures++;
              $display("FAIL t=%0d sum%0d%0d %0d expected %0d", t, u, g, sum[u * NU + g], s);
            end
          end
      end
      shift = ($urandom_range(0, 3) != 0);
      if (shift) begin
        int c[N];
        for (int i = 0; i < N; i++) begin
          c[i] = (t >= 200 && t < 230) ? 255 : $urandom_range(0, 255);
          col_in[i] = 8'(c[i]);
        end
        cols.push_back(c);
      end else begin
        col_in = {N{8'($urandom)}};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
