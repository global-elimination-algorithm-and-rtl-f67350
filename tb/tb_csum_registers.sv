// Testbench of the csum registers: values are captured only on load and held otherwise.
module tb_csum_registers;
  localparam int NS = 16, SW = 12;
  logic clk = 0, load = 0;
  logic [NS-1:0][SW-1:0] d = '0, q, exp;
  int checks = 0, failures = 0;

  csum_registers #(.NS(NS), .SW(SW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      load = ($urandom_range(0, 4) == 0) || t == 0;
      for (int i = 0; i < NS; i++) d[i] = SW'($urandom);
      if (load) exp = d;
      @(negedge clk);
      load = 0;
      for (int i = 0; i < NS; i++) d[i] = SW'($urandom);
      checks++;
      if (q != exp) begin failures++; $display("FAIL t=%0d", t); end
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
