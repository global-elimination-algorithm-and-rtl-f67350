// Testbench of the search-area memory: writes random band columns, then reads with an
// independent random address per bank and checks each bank's word one cycle later
// against a model of the row-to-bank mapping (row y -> bank y mod N, word
// (y div N)*SA_COLS + x). Also checks that rdata holds while re is low.
module tb_sram_search_area;
  localparam int N = 16, P = 16, SA_COLS = 48, BANDS = 3, D = BANDS * SA_COLS;
  logic clk = 0, we = 0, re = 0;
  logic [1:0] wband = 0;
  logic [5:0] wcol = 0;
  logic [N-1:0][7:0] wdata = '0, rdata;
  logic [N-1:0][7:0] raddr = '0;
  int checks = 0, failures = 0;
  int model[BANDS * N][SA_COLS];   // [row][col]

  sram_search_area #(.N(N), .P(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int b = 0; b < BANDS; b++)
      for (int x = 0; x < SA_COLS; x++) begin
        @(negedge clk);
        we = 1; wband = 2'(b); wcol = 6'(x);
        for (int i = 0; i < N; i++) begin
          wdata[i] = 8'($urandom);
          model[b * N + i][x] = wdata[i];
        end
      end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      logic [N-1:0][7:0] exp;
      re = 1;
      for (int k = 0; k < N; k++) begin
        int b, x;
        b = $urandom_range(0, BANDS - 1); x = $urandom_range(0, SA_COLS - 1);
        raddr[k] = 8'(b * SA_COLS + x);
        exp[k] = 8'(model[b * N + k][x]);
      end
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata != exp) begin failures++; $display("FAIL read %0d", t); end
      @(negedge clk);
      checks++;
      if (rdata != exp) begin failures++; $display("FAIL hold %0d", t); end
    end
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
