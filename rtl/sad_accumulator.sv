// SAD accumulator and final selection. In the SAD pass the SAD tree delivers the SAD of
// one column of a candidate block per cycle; this block adds the N column values of
// each candidate and, at the candidate's last column, compares the total with SAD_min.
// A strictly smaller total replaces SAD_min and the best MV, so among equal SADs the
// earlier candidate is kept. init (one cycle) sets SAD_min to all ones, larger than any
// SAD. Controls: en marks a valid column value, first the first column of a candidate
// and last its last column; sad_min/mv_best change on the edge that ends the last
// column.
module sad_accumulator #(
  parameter int unsigned SW  = 16,
  parameter int unsigned MVW = 5
) (
  input  logic               clk,
  input  logic               init,
  input  logic               en,
  input  logic               first,
  input  logic               last,
  input  logic [SW-1:0]      partial,
  input  logic [2*MVW-1:0]   mv,
  output logic [SW-1:0]      sad_min,
  output logic [2*MVW-1:0]   mv_best,
  output logic               updated
);
  logic [SW-1:0] acc;
  logic [SW-1:0] total;

  always_comb begin
    total   = (first ? '0 : acc) + partial;
    updated = en && last && (total < sad_min);
  end

  always_ff @(posedge clk) begin
    if (init) begin
      acc     <= '0;
      sad_min <= '1;
      mv_best <= '0;
    end else if (en) begin
      acc <= total;
      if (updated) begin
        sad_min <= total;
        mv_best <= mv;
      end
    end
  end
endmodule
