// Parallel comparator tree: keeps the M smallest SSADs seen so far, with their motion
// vectors, without any sorting hardware.
//
// Forward part: a tree of MAX units finds SSAD_max, the largest of SSAD_in_reg and the M
// stored values SSAD1_reg..SSADM_reg. Feedback part 1: EQUx flags every stored value
// equal to SSAD_max, and CHECK keeps only the lowest-numbered flag (EQU1 and EQU2 both
// active -> only replace1). Feedback part 2: the selected SSADx_reg / mvx_reg take the
// values of SSAD_in_reg / mv_in_reg. When the new SSAD is larger than every stored
// value no EQU fires and nothing changes; when it ties with the largest stored value,
// that stored entry is replaced by the newer one.
//
// Timing: ssad/mv_in are captured into SSAD_in_reg/mv_in_reg each cycle (all ones when
// in_valid is low, so that invalid positions never displace a stored entry); the
// compare-and-replace of that value happens on the next edge, so one SSAD is accepted
// per cycle with a latency of two edges. init (one cycle, before the first valid SSAD)
// sets SSAD_in_reg and all stored SSADs to all ones (0xFFFF), larger than any real
// SSAD. Slot x-1 of the output arrays is SSADx_reg / mvx_reg.
module compare_tree #(
  parameter int unsigned M   = 7,
  parameter int unsigned SW  = 16,
  parameter int unsigned MVW = 5
) (
  input  logic                       clk,
  input  logic                       init,
  input  logic                       in_valid,
  input  logic [SW-1:0]              ssad,
  input  logic [2*MVW-1:0]           mv_in,
  output logic [M-1:0][SW-1:0]       ssad_regs,
  output logic [M-1:0][2*MVW-1:0]    mv_regs,
  output logic [M-1:0]               replace,
  output logic                       multi_equ
);
  localparam int unsigned NI = M + 1;           // inputs of the MAX tree
  localparam int unsigned LV = $clog2(NI);

  logic [SW-1:0]       ssad_in_reg;
  logic [2*MVW-1:0]    mv_in_reg;
  logic [SW-1:0]       ssad_max;
  logic [M-1:0]        equ;

  // Forward part: MAX tree, level 0 = {SSAD_in_reg, SSAD1_reg, ..., SSADM_reg}.
  logic [LV:0][(1<<LV)-1:0][SW-1:0] mx;
  always_comb begin
    mx = '0;
    mx[0][0] = ssad_in_reg;
    for (int i = 0; i < M; i++) mx[0][i+1] = ssad_regs[i];
    for (int l = 1; l <= LV; l++) begin
      for (int i = 0; i < ((1 << LV) >> l); i++) begin
        mx[l][i] = (mx[l-1][2*i] >= mx[l-1][2*i+1]) ? mx[l-1][2*i] : mx[l-1][2*i+1];
      end
    end
    ssad_max = mx[LV][0];
  end

  // Feedback part 1: EQU units and CHECK (lowest index wins).
  always_comb begin
    logic found;
    found = 1'b0;
    replace = '0;
    for (int i = 0; i < M; i++) begin
      equ[i] = (ssad_regs[i] == ssad_max);
      if (equ[i] && !found) begin
        replace[i] = 1'b1;
        found = 1'b1;
      end
    end
    multi_equ = (equ & (equ - M'(1))) != '0;
  end

  // Input registers and feedback part 2: replacement.
  always_ff @(posedge clk) begin
    if (init) begin
      ssad_in_reg <= '1;
      mv_in_reg   <= '0;
      ssad_regs   <= '1;
      mv_regs     <= '0;
    end else begin
      ssad_in_reg <= in_valid ? ssad : '1;
      mv_in_reg   <= mv_in;
      for (int i = 0; i < M; i++) begin
        if (replace[i]) begin
          ssad_regs[i] <= ssad_in_reg;
          mv_regs[i]   <= mv_in_reg;
        end
      end
    end
  end

  // CHECK never selects more than one entry.
  always_comb assert ((replace & (replace - M'(1))) == '0);
endmodule
