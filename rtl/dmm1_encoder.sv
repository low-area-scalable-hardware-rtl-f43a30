// dmm1_encoder: scalable DMM-1 (wedgelet) encoder for one N x N depth block.
//
// For every wedgelet pattern in the pattern memory the encoder forms the two
// region averages (prediction step), the SAD between the block and the
// two-level prediction (SAD step), keeps the pattern with the lowest SAD, and
// finally streams out the residue block for that pattern. There is no
// refinement search around the winner.
//
// Data path. An N x N array of D-Cores holds the block, one sample per core.
// Each issued step becomes a token {step, pattern index, two averages} that
// travels one array column per clock; core (r,c) adds its term to the partial
// result of core (r,c-1), so N patterns are in the array at once, one per
// column. The pattern memory has one read port per column, addressed by the
// token one stage upstream, so the pattern bits arrive with the token. Two
// adder trees sum the N row results per region. After the prediction step
// two dividers (reciprocal from the division-value memory, then multiply)
// turn the region sums into averages, which go to the register bank; the
// controller feeds them back with the pattern's SAD step, interlaced with the
// prediction steps of later patterns. After the SAD step the comparator keeps
// the best pattern. The residue step then computes pixel - prediction in all
// cores, and column c of residues leaves on `res_data` as its token passes.
//
// Interface. Load patterns once after reset with pat_wr_* (one PR x PR
// pattern per clock, bit r*PR+c = row r, column c). Give a block as N rows
// with row_valid/row_ready. After processing, res_valid is high for N clocks,
// column res_col = 0 .. N-1 of residues on res_data[row]; `done` marks the
// last column, and best_* hold the chosen wedgelet until the next block is
// complete. Timing: a block takes 4N + 2*NUM_PAT + 8 clocks from the first row
// accepted to `done` inclusive (140 for 4x4 with 58 patterns, 904 for 32x32
// with 384). The array, adder trees, dividers, comparator, register bank,
// memories and the interlaced schedule follow the published architecture;
// the token pipeline, the reciprocal dividers and the exact latencies are
// choices of this design.
module dmm1_encoder
  import dmm1_pkg::*;
#(
  parameter int unsigned N       = 32,                // block size
  parameter int unsigned PR      = (N > 16) ? 16 : N, // stored pattern resolution
  parameter int unsigned NUM_PAT = 384,               // wedgelets evaluated
  localparam int unsigned SW     = sum_width(N),
  localparam int unsigned CW     = cnt_width(N),
  localparam int unsigned RW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW     = (NUM_PAT > 1) ? $clog2(NUM_PAT) : 1,
  localparam int unsigned MW     = SW + 1 + CW + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // pattern table load
  input  logic                    pat_wr_en,
  input  logic [IW-1:0]           pat_wr_addr,
  input  logic [PR*PR-1:0]        pat_wr_data,
  // block input, one row per clock
  input  logic                    row_valid,
  output logic                    row_ready,
  input  logic [PIX_W-1:0]        row_pixels [N],
  output logic                    busy,
  // residue output, one column per clock
  output logic                    res_valid,
  output logic [RW-1:0]           res_col,
  output logic signed [RES_W-1:0] res_data [N],
  output logic                    done,
  // chosen wedgelet
  output logic [IW-1:0]           best_idx,
  output logic [SW:0]             best_sad,
  output logic [PIX_W-1:0]        best_avg0,
  output logic [PIX_W-1:0]        best_avg1
);

  typedef struct packed {
    logic             valid;
    stage_e           stage;
    logic [IW-1:0]    idx;
    logic [PIX_W-1:0] avg0;
    logic [PIX_W-1:0] avg1;
    logic [CW-1:0]    cnt1;   // region-1 samples seen so far
  } token_t;

  // ---------------------------------------------------------------- control
  logic          load_en;
  logic [RW-1:0] load_row;
  logic          fifo_empty, fifo_full, fifo_pop, fifo_push;
  logic          sad_done, res_last, cmp_clear;
  logic          iss_valid;
  stage_e        iss_stage;
  logic [IW-1:0] iss_idx;
  logic [IW-1:0] head_idx;
  logic [PIX_W-1:0] head_avg0, head_avg1;
  logic          have_best, improved;

  dmm1_control #(.N(N), .NUM_PAT(NUM_PAT)) u_ctrl (
    .clk, .rst_n, .row_valid, .row_ready, .load_en, .load_row,
    .fifo_empty, .fifo_pop, .sad_done, .res_last, .cmp_clear,
    .iss_valid, .iss_stage, .iss_idx, .busy
  );

  // ------------------------------------------------------- token pipeline
  // tok[c] is at array column c; tok[N] meets the east outputs, tok[N+1] the
  // adder-tree sums (stage A), tok[N+2] the divider outputs (stage B).
  token_t tok [N+3];
  token_t issue;

  always_comb begin
    issue       = '0;
    issue.valid = iss_valid;
    issue.stage = iss_stage;
    unique case (iss_stage)
      STG_SAD: begin
        issue.idx  = head_idx;
        issue.avg0 = head_avg0;
        issue.avg1 = head_avg1;
      end
      STG_RES: begin
        issue.idx  = best_idx;
        issue.avg0 = best_avg0;
        issue.avg1 = best_avg1;
      end
      default: issue.idx = iss_idx;
    endcase
  end

  // --------------------------------------------------------- pattern memory
  logic [IW-1:0] rd_addr  [N];
  logic [N-1:0]  col_bits [N];

  for (genvar c = 0; c < N; c++) begin : g_addr
    if (c == 0) begin : g_first
      assign rd_addr[c] = issue.idx;
    end else begin : g_next
      assign rd_addr[c] = tok[c-1].idx;
    end
  end

  dmm1_pattern_mem #(.N(N), .PR(PR), .NUM_PAT(NUM_PAT)) u_pat_mem (
    .clk, .wr_en(pat_wr_en), .wr_addr(pat_wr_addr), .wr_data(pat_wr_data),
    .rd_addr, .rd_data(col_bits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N + 3; i++) tok[i] <= '0;
    end else begin
      tok[0] <= issue;
      for (int c = 0; c < N; c++) begin
        tok[c+1]      <= tok[c];
        tok[c+1].cnt1 <= tok[c].cnt1 + CW'($countones(col_bits[c]));
      end
      tok[N+1] <= tok[N];
      tok[N+2] <= tok[N+1];
    end
  end

  // ------------------------------------------------------------ core array
  stage_e                  col_stage [N];
  logic [PIX_W-1:0]        col_avg0  [N];
  logic [PIX_W-1:0]        col_avg1  [N];
  logic [SW-1:0]           east0     [N];
  logic [SW-1:0]           east1     [N];
  logic signed [RES_W-1:0] residue   [N][N];

  always_comb begin
    for (int c = 0; c < N; c++) begin
      col_stage[c] = tok[c].stage;
      col_avg0[c]  = tok[c].avg0;
      col_avg1[c]  = tok[c].avg1;
    end
  end

  dmm1_core_array #(.N(N), .SW(SW)) u_array (
    .clk, .load_en, .load_row, .pixel_row(row_pixels),
    .col_stage, .col_bits, .col_avg0, .col_avg1,
    .east0, .east1, .residue
  );

  // ------------------------------------------------------------ adder trees
  logic [SW-1:0] sum0, sum1;

  dmm1_adder_tree #(.N(N), .W(SW)) u_tree0 (.clk, .in(east0), .sum(sum0));
  dmm1_adder_tree #(.N(N), .W(SW)) u_tree1 (.clk, .in(east1), .sum(sum1));

  // --------------------------------------------------------------- dividers
  logic [CW-1:0]    cnt0, cnt1;
  logic [MW-1:0]    recip0, recip1;
  logic [PIX_W-1:0] div_avg0, div_avg1;

  assign cnt1 = tok[N+1].cnt1;
  assign cnt0 = CW'(N * N) - tok[N+1].cnt1;

  dmm1_divider_mem #(.MAXCNT(N * N), .XW(SW + 1)) u_div_mem (
    .cnt0, .cnt1, .recip0, .recip1
  );

  dmm1_divider #(.SW(SW), .CW(CW)) u_div0 (
    .clk, .sum(sum0), .count(cnt0), .recip(recip0), .avg(div_avg0)
  );
  dmm1_divider #(.SW(SW), .CW(CW)) u_div1 (
    .clk, .sum(sum1), .count(cnt1), .recip(recip1), .avg(div_avg1)
  );

  // ----------------------------------------------------------- register bank
  assign fifo_push = tok[N+2].valid && (tok[N+2].stage == STG_PRED);

  dmm1_reg_bank #(.DEPTH(4), .IW(IW)) u_bank (
    .clk, .rst_n,
    .push(fifo_push), .push_idx(tok[N+2].idx),
    .push_avg0(div_avg0), .push_avg1(div_avg1),
    .pop(fifo_pop), .head_idx, .head_avg0, .head_avg1,
    .empty(fifo_empty), .full(fifo_full)
  );

  // -------------------------------------------------------------- comparator
  assign sad_done = tok[N+1].valid && (tok[N+1].stage == STG_SAD);

  dmm1_comparator #(.SW(SW), .IW(IW)) u_cmp (
    .clk, .rst_n, .clear(cmp_clear), .valid(sad_done),
    .sad0(sum0), .sad1(sum1), .idx(tok[N+1].idx),
    .avg0(tok[N+1].avg0), .avg1(tok[N+1].avg1),
    .best_sad, .best_idx, .best_avg0, .best_avg1, .have_best, .improved
  );

  // ---------------------------------------------------------- residue output
  always_comb begin
    res_valid = 1'b0;
    res_col   = '0;
    for (int c = 0; c < N; c++) begin
      if (tok[c+1].valid && tok[c+1].stage == STG_RES) begin
        res_valid = 1'b1;
        res_col   = RW'(c);
      end
    end
    for (int r = 0; r < N; r++) res_data[r] = residue[r][res_col];
  end

  assign res_last = tok[N].valid && (tok[N].stage == STG_RES);
  assign done     = res_last;

  // The register bank never overflows: the controller pops it at the same
  // rate as the dividers fill it. The residue stage needs a chosen wedgelet.
  a_bank_room: assert property (@(posedge clk) disable iff (!rst_n)
                                fifo_push |-> (!fifo_full || fifo_pop));
  a_res_best:  assert property (@(posedge clk) disable iff (!rst_n)
                                (iss_valid && iss_stage == STG_RES) |-> have_best);

endmodule
