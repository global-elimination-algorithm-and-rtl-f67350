// Testbench of the current-block memory: writes the N columns of a random block, reads
// them back in random order and checks each column one cycle after the read address.
module tb_sram_current_block;
  localparam int N = 16;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [N-1:0][7:0] wdata = '0, rdata;
  logic [N-1:0][7:0] model[N];
  int checks = 0, failures = 0;

  sram_current_block #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      we = 1; waddr = 4'(c);
      for (int r = 0; r < N; r++) wdata[r] = 8'($urandom);
      model[c] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 100; t++) begin
      int a;
      a = $urandom_range(0, N - 1);
      re = 1; raddr = 4'(a);
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL col %0d", a); end
    end
    // overwrite one column and read it back
    we = 1; re = 0; waddr = 4'd5; wdata = {N{8'hA5}}; model[5] = wdata;
    @(negedge clk); we = 0; re = 1; raddr = 4'd5;
    @(negedge clk);
    checks++;
    if (rdata != model[5]) begin failures++; $display("FAIL overwrite"); end
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
