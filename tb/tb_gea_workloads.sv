// Runs the GEA core in the other evaluated configurations, all with 16x16 blocks and 4x4
// subblocks: the large search range [-32,+31] (p = 32, used for CIF frames) at M = 7,
// and the sweep of the candidate count M = 1, 3, 15, 31, 63 at p = 16. (The default,
// p = 16 with M = 7, is covered by tb_gea_me.) Each configuration is an instance of
// tb_gea_case, run concurrently; the test passes when all of them do.
module tb_gea_workloads;
  localparam int NC = 6;
  bit fin[NC];
  int ch[NC], fl[NC], same[NC];

  tb_gea_case #(.P(32), .M(7),  .NBLK(2)) c0 (fin[0], ch[0], fl[0], same[0]);
  tb_gea_case #(.P(16), .M(1),  .NBLK(2)) c1 (fin[1], ch[1], fl[1], same[1]);
  tb_gea_case #(.P(16), .M(3),  .NBLK(2)) c2 (fin[2], ch[2], fl[2], same[2]);
  tb_gea_case #(.P(16), .M(15), .NBLK(2)) c3 (fin[3], ch[3], fl[3], same[3]);
  tb_gea_case #(.P(16), .M(31), .NBLK(2)) c4 (fin[4], ch[4], fl[4], same[4]);
  tb_gea_case #(.P(16), .M(63), .NBLK(2)) c5 (fin[5], ch[5], fl[5], same[5]);

  initial begin
    int checks, failures;
    bit all;
    forever begin
      #1000;
      all = 1;
      foreach (fin[i]) all &= fin[i];
      if (all) break;
    end
    checks = 0; failures = 0;
    foreach (fin[i]) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0], 1 + fl[0]);
    $finish;
  end
endmodule
