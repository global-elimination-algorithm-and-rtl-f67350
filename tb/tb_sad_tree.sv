// Testbench of the SAD tree: random 12-bit lane pairs, 8-bit pixel pairs and the
// extreme case (all |a-b| = 4095 would overflow 16 bits only beyond 65535; the largest
// real SSAD, 16 x 4080 = 65280, is checked exactly).
module tb_sad_tree;
  localparam int NL = 16, IW = 12, OW = 16;
  logic [NL-1:0][IW-1:0] a, b;
  logic [OW-1:0] sum;
  int checks = 0, failures = 0;

  sad_tree #(.NL(NL), .IW(IW), .OW(OW)) dut (.*);

  task automatic check_now();
    int s = 0;
    for (int i = 0; i < NL; i++) s += (a[i] > b[i]) ? int'(a[i]) - int'(b[i]) : int'(b[i]) - int'(a[i]);
    #1;
    checks++;
    if (int'(sum) != (s & 16'hFFFF)) begin failures++; $display("FAIL sum %0d expected %0d", sum, s); end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NL; i++) begin
        if (t < 250) begin a[i] = IW'($urandom_range(0, 4080)); b[i] = IW'($urandom_range(0, 4080)); end
        else begin a[i] = IW'($urandom_range(0, 255)); b[i] = IW'($urandom_range(0, 255)); end
      end
      check_now();
    end
    for (int i = 0; i < NL; i++) begin a[i] = (i % 2) ? 12'd4080 : 12'd0; b[i] = (i % 2) ? 12'd0 : 12'd4080; end
    check_now();
    a = b;
    check_now();
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
