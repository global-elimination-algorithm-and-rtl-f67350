// Mux network: barrel rotator that puts the N search-area bank outputs back into row
// order. Bank k holds the rows whose index mod N is k, so for a column whose top row
// has index mod N equal to rot, output lane i (row offset i) is bank (i + rot) mod N.
// Purely combinational. Two instances exist: network 1 feeds the systolic part, network
// 2 feeds the SAD tree in the SAD pass.
module mux_network
  import gea_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0][PIXW-1:0]  din,
  input  logic [$clog2(N)-1:0]    rot,
  output logic [N-1:0][PIXW-1:0]  dout
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      dout[i] = din[(i + int'(rot)) % N];
    end
  end
endmodule
