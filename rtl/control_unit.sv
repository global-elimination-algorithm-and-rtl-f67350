// Control unit of the GEA core: sequences one macroblock and generates every memory
// address, multiplexer select and pipeline flag.
//
// Schedule after start (S = the start cycle, issue = memory read address cycle):
//   LOADC  N cycles        read current-block columns 0..N-1 (to the systolic part)
//   LOADS  2P*(2P+N-1)     for each search-position row n' = 0..2P-1 (raster order, top
//                          row first), read search-area columns x' = 0..2P+N-2 of rows
//                          n'..n'+N-1. The window that ends at column x' belongs to
//                          search position (x'-N+1-P, n'-P); the first N-1 columns of
//                          each row give invalid SSADs, flagged so the comparator sees
//                          0xFFFF there.
//   DRAIN1 3 cycles        wait until the comparator holds the final M candidates
//   SADP   M*N cycles      for candidate c = 0..M-1, read its N columns from both memories
//                          (SAD tree in pixel mode, results accumulated)
//   DRAIN2 1 cycle         last column SAD is accumulated and compared
//   FIN    1 cycle         done = 1, results valid; back to idle
// done therefore rises N + 2P(2P+N-1) + MN + 5 cycles after the start cycle (1637 for the
// default sizes). Memory data arrive one cycle after the address; the control flags
// for the data are delayed to match: *_d1 flags act in the data cycle (issue+1) and the
// SSAD flags in issue+2, when the SAD tree sees the subblock sums of that window.
//
// Search-area addressing: bank k holds rows y with y mod N = k at word
// (y div N)*SA_COLS + c, so for top row n' bank k is read at band n' div N when
// k >= n' mod N and at the next band otherwise; the bank outputs must then be rotated
// by n' mod N (rot1 for the SSAD pass, rot2 for the SAD pass). Columns are stored
// circularly: search-area column x sits in memory column c = (col_base + x) mod SA_COLS,
// col_base being sampled at start. Moving to the next macroblock to the right, the
// loader adds N to col_base and writes only the N new columns; the 2P+N-1-N columns
// shared with the previous search area stay in place.
// The start/busy/done handshake and the asynchronous active-low reset are this
// design's choices; the phase order and cycle counts follow the reference schedule.
module control_unit
  import gea_pkg::*;
#(
  parameter int unsigned N       = 16,
  parameter int unsigned P       = 16,
  parameter int unsigned M       = 7,
  localparam int unsigned W       = 2 * P + N - 1,
  localparam int unsigned SA_COLS = 2 * P + N,
  localparam int unsigned BANDS   = (W + N - 1) / N,
  localparam int unsigned AW      = $clog2(BANDS * SA_COLS),
  localparam int unsigned MVW     = mv_width(P),
  localparam int unsigned NW      = $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [$clog2(SA_COLS)-1:0] col_base,    // memory column of search-area column 0
  output logic                       busy,
  output logic                       done,
  output logic                       init,        // clear comparator and accumulator
  // current-block memory
  output logic                       cur_re,
  output logic [NW-1:0]              cur_raddr,
  // search-area memory
  output logic                       sa_re,
  output logic [N-1:0][AW-1:0]       sa_raddr,
  // data-cycle controls (issue + 1)
  output logic                       sel_cur,     // MUX A: current block to systolic part
  output logic                       sys_shift,   // systolic part takes a column
  output logic [NW-1:0]              rot1,        // mux network 1 rotation
  output logic [NW-1:0]              rot2,        // mux network 2 rotation
  output logic                       sad_mode,    // MUX B/C: pixel operands
  output logic                       acc_en,
  output logic                       acc_first,
  output logic                       acc_last,
  output logic [2*MVW-1:0]           acc_mv,
  // SSAD-cycle controls (issue + 2)
  output logic                       csum_load,
  output logic                       ssad_valid,
  output logic [2*MVW-1:0]           ssad_mv,
  // candidates held by the comparator, slot 0 = mv1_reg
  input  logic [M-1:0][2*MVW-1:0]    cand_mv,
  // statistics for verification: window is an invalid (bubble) SSAD cycle
  output logic                       bubble
);
  typedef enum logic [2:0] {IDLE, LOADC, LOADS, DRAIN1, SADP, DRAIN2, FIN} state_t;

  state_t                 state;
  logic [$clog2(W)-1:0]   col;     // column within a current block / search row / candidate
  logic [$clog2(2*P)-1:0] row;     // search-position row n'
  logic [$clog2(M+1)-1:0] cand;    // candidate slot in the SAD pass
  logic [1:0]             drain;
  logic [$clog2(SA_COLS)-1:0] base_q;  // col_base sampled at start

  // Stage registers.
  typedef struct packed {
    logic             cur;
    logic             sa;
    logic             last_cur;
    logic             ssad_ok;
    logic [2*MVW-1:0] mv;
    logic [NW-1:0]    rot;
    logic             sad;
    logic             first;
    logic             last;
  } stage_t;
  stage_t s0, d1;
  logic   d2_csum, d2_valid, d2_bubble;
  logic [2*MVW-1:0] d2_mv;

  // Candidate being read in the SAD pass: top row and left column, offset by P.
  logic [MVW-1:0]         cmx, cmy;
  int unsigned            top, left;

  function automatic logic [N-1:0][AW-1:0] sa_addr(int unsigned t, int unsigned x);
    logic [N-1:0][AW-1:0] a;
    for (int k = 0; k < N; k++) begin
      a[k] = AW'(((k >= int'(t % N)) ? (t / N) : (t / N + 1)) * SA_COLS + (int'(base_q) + x) % SA_COLS);
    end
    return a;
  endfunction

  always_comb begin
    {cmx, cmy} = cand_mv[(int'(cand) < M) ? int'(cand) : 0];
    top  = int'(unsigned'(MVW'(cmy + MVW'(P))));
    left = int'(unsigned'(MVW'(cmx + MVW'(P))));
    // the offsets live in [0, 2P-1]; with 2P = 2^MVW the wrap above is exact
  end

  // Issue-cycle decode.
  always_comb begin
    s0        = '0;
    cur_re    = 1'b0;
    cur_raddr = '0;
    sa_re     = 1'b0;
    sa_raddr  = '0;
    unique case (state)
      LOADC: begin
        cur_re      = 1'b1;
        cur_raddr   = NW'(col);
        s0.cur      = 1'b1;
        s0.last_cur = (int'(col) == N - 1);
      end
      LOADS: begin
        sa_re      = 1'b1;
        sa_raddr   = sa_addr(int'(row), int'(col));
        s0.sa      = 1'b1;
        s0.rot     = NW'(row % N);
        s0.ssad_ok = (int'(col) >= N - 1);
        s0.mv      = {MVW'(int'(col) - (N - 1) - P), MVW'(int'(row) - P)};
      end
      SADP: begin
        cur_re    = 1'b1;
        cur_raddr = NW'(col);
        sa_re     = 1'b1;
        sa_raddr  = sa_addr(top, left + int'(col));
        s0.sad    = 1'b1;
        s0.rot    = NW'(top % N);
        s0.first  = (col == 0);
        s0.last   = (int'(col) == N - 1);
        s0.mv     = {cmx, cmy};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      col   <= '0;
      row   <= '0;
      cand  <= '0;
      drain <= '0;
      base_q <= '0;
      d1    <= '0;
      d2_csum   <= 1'b0;
      d2_valid  <= 1'b0;
      d2_bubble <= 1'b0;
      d2_mv     <= '0;
    end else begin
      d1        <= s0;
      d2_csum   <= d1.last_cur;
      d2_valid  <= d1.sa && d1.ssad_ok;
      d2_bubble <= d1.sa && !d1.ssad_ok;
      d2_mv     <= d1.mv;
      unique case (state)
        IDLE: if (start) begin
          state  <= LOADC;
          col    <= '0;
          base_q <= col_base;
        end
        LOADC: begin
          col <= col + 1'b1;
          if (int'(col) == N - 1) begin
            state <= LOADS;
            col   <= '0;
            row   <= '0;
          end
        end
        LOADS: begin
          col <= col + 1'b1;
          if (int'(col) == W - 1) begin
            col <= '0;
            row <= row + 1'b1;
            if (int'(row) == 2 * P - 1) begin
              state <= DRAIN1;
              drain <= '0;
            end
          end
        end
        DRAIN1: begin
          drain <= drain + 1'b1;
          if (drain == 2) begin
            state <= SADP;
            col   <= '0;
            cand  <= '0;
          end
        end
        SADP: begin
          col <= col + 1'b1;
          if (int'(col) == N - 1) begin
            col  <= '0;
            cand <= cand + 1'b1;
            if (int'(cand) == M - 1) state <= DRAIN2;
          end
        end
        DRAIN2: state <= FIN;
        FIN:    state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign busy      = (state != IDLE);
  assign done      = (state == FIN);
  assign init      = (state == IDLE) && start;
  assign sel_cur   = d1.cur;
  assign sys_shift = d1.cur || d1.sa;
  assign rot1      = d1.rot;
  assign rot2      = d1.rot;
  assign sad_mode  = d1.sad;
  assign acc_en    = d1.sad;
  assign acc_first = d1.first;
  assign acc_last  = d1.last;
  assign acc_mv    = d1.mv;
  assign csum_load = d2_csum;
  assign ssad_valid = d2_valid;
  assign ssad_mv   = d2_mv;
  assign bubble    = d2_bubble;

  initial assert ((1 << MVW) == 2 * P) else $error("P must be a power of two");
endmodule
