// Testbench of the mux network: for every rotation and random bank data, output lane i
// must carry bank (i + rot) mod N.
module tb_mux_network;
  localparam int N = 16;
  logic [N-1:0][7:0] din, dout;
  logic [3:0] rot;
  int checks = 0, failures = 0;

  mux_network #(.N(N)) dut (.*);

  initial begin
    for (int t = 0; t < 20; t++)
      for (int r = 0; r < N; r++) begin
        for (int i = 0; i < N; i++) din[i] = 8'($urandom);
        rot = 4'(r);
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (dout[i] !== din[(i + r) % N]) begin
            failures++;
            $display("FAIL rot %0d lane %0d", r, i);
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
