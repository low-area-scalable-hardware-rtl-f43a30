// tb_dmm1_encoder_full: end-to-end test of the DMM-1 encoder at its default
// size (32x32 blocks, 384 stored 16x16 wedgelets).
//
// The testbench builds its own wedgelet table: straight lines between two
// points on the block border, each sample on the side of the line given by
// the sign of a cross product, keeping only distinct two-region patterns
// (random two-region patterns fill up the table if lines run short). It then
// encodes several blocks (sharp-edged depth blocks, random blocks and a flat
// block, where every pattern ties) and compares the chosen pattern, its SAD,
// its averages, every residue and the cycle count 4N + 2*NUM_PAT + 8 with a
// reference computed here. It also counts the mechanisms of the architecture
// (row fill, prediction and SAD steps, their interlacing, register-bank
// feedback, comparator updates, residue stage, pattern upsampling when the
// stored resolution is below the block size) and fails if one never occurs.
module tb_dmm1_encoder_full;
  import dmm1_pkg::*;

  localparam int unsigned N       = 32;
  localparam int unsigned PR      = 16;
  localparam int unsigned NUM_PAT = 384;
  localparam int unsigned NBLK    = 3;
  localparam int unsigned S       = N / PR;
  localparam int unsigned SW      = sum_width(N);
  localparam int unsigned RW      = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned IW      = (NUM_PAT > 1) ? $clog2(NUM_PAT) : 1;
  localparam int unsigned EXP_CYC = 4 * N + 2 * NUM_PAT + 8;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    pat_wr_en = 1'b0;
  logic [IW-1:0]           pat_wr_addr = '0;
  logic [PR*PR-1:0]        pat_wr_data = '0;
  logic                    row_valid = 1'b0;
  logic                    row_ready;
  logic [PIX_W-1:0]        row_pixels [N];
  logic                    busy;
  logic                    res_valid;
  logic [RW-1:0]           res_col;
  logic signed [RES_W-1:0] res_data [N];
  logic                    done;
  logic [IW-1:0]           best_idx;
  logic [SW:0]             best_sad;
  logic [PIX_W-1:0]        best_avg0, best_avg1;

  dmm1_encoder u_dut (
    .clk, .rst_n, .pat_wr_en, .pat_wr_addr, .pat_wr_data,
    .row_valid, .row_ready, .row_pixels, .busy,
    .res_valid, .res_col, .res_data, .done,
    .best_idx, .best_sad, .best_avg0, .best_avg1
  );

  always #5 clk = !clk;

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (20000 + NBLK * (EXP_CYC + 4 * N) + 4 * NUM_PAT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------- wedgelet table
  logic [PR*PR-1:0] pats [NUM_PAT];
  int unsigned      npat = 0;
  int unsigned      seed = 32'h1234_5678;

  function automatic int unsigned rnd(inout int unsigned s, input int unsigned m);
    s = s * 32'd1664525 + 32'd1013904223;
    return (s >> 8) % m;
  endfunction

  // point on the border of a block with corners (0,0)..(2PR,2PR), half-sample units
  task automatic border_point(inout int unsigned s, input int edge_id, output int x, output int y);
    int t;
    t = int'(rnd(s, 2 * PR + 1));
    case (edge_id)
      0: begin x = t;        y = 0;        end
      1: begin x = 2 * PR;   y = t;        end
      2: begin x = t;        y = 2 * PR;   end
      default: begin x = 0;  y = t;        end
    endcase
  endtask

  function automatic bit is_new(input logic [PR*PR-1:0] p, input int unsigned n);
    for (int unsigned i = 0; i < n; i++) if (pats[i] == p) return 1'b0;
    return 1'b1;
  endfunction

  task automatic build_table();
    int x0, y0, x1, y1, e0, e1;
    logic [PR*PR-1:0] p;
    int unsigned tries = 0;
    while (npat < NUM_PAT && tries < 200000) begin
      tries++;
      e0 = int'(rnd(seed, 4));
      e1 = (e0 + 1 + int'(rnd(seed, 3))) % 4;
      border_point(seed, e0, x0, y0);
      border_point(seed, e1, x1, y1);
      for (int r = 0; r < int'(PR); r++)
        for (int c = 0; c < int'(PR); c++)
          p[r*PR + c] = ((x1 - x0) * (2*r + 1 - y0) - (y1 - y0) * (2*c + 1 - x0)) > 0;
      if (p != '0 && p != '1 && is_new(p, npat)) begin
        pats[npat] = p;
        npat++;
      end
    end
    while (npat < NUM_PAT) begin
      for (int i = 0; i < int'(PR*PR); i++) p[i] = rnd(seed, 2) == 1;
      if (p != '0 && p != '1) begin
        pats[npat] = p;
        npat++;
      end
    end
  endtask

  function automatic bit pbit(input int unsigned p, input int r, input int c);
    return pats[p][(r / int'(S)) * int'(PR) + (c / int'(S))];
  endfunction

  // ----------------------------------------------------- reference model
  logic [PIX_W-1:0] blk [N][N];
  int unsigned ref_idx, ref_sad, ref_a0, ref_a1;
  int unsigned ref_improvements;

  task automatic reference();
    int unsigned s0, s1, c0, c1, a0, a1, sad, a;
    ref_sad = 32'hFFFF_FFFF;
    ref_improvements = 0;
    for (int unsigned p = 0; p < NUM_PAT; p++) begin
      s0 = 0; s1 = 0; c0 = 0; c1 = 0;
      for (int r = 0; r < int'(N); r++)
        for (int c = 0; c < int'(N); c++)
          if (pbit(p, r, c)) begin s1 += blk[r][c]; c1++; end
          else               begin s0 += blk[r][c]; c0++; end
      a0 = (c0 == 0) ? 0 : (s0 + c0 / 2) / c0;
      a1 = (c1 == 0) ? 0 : (s1 + c1 / 2) / c1;
      sad = 0;
      for (int r = 0; r < int'(N); r++)
        for (int c = 0; c < int'(N); c++) begin
          a = pbit(p, r, c) ? a1 : a0;
          sad += (blk[r][c] > a) ? blk[r][c] - a : a - blk[r][c];
        end
      if (sad < ref_sad) begin
        if (p != 0) ref_improvements++;
        ref_sad = sad; ref_idx = p; ref_a0 = a0; ref_a1 = a1;
      end
    end
  endtask

  task automatic make_block(input int kind);
    int unsigned p, v0, v1, n;
    p  = rnd(seed, NUM_PAT);
    v0 = rnd(seed, 200);
    v1 = 40 + rnd(seed, 216);
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(N); c++) begin
        case (kind)
          0: begin   // sharp edge plus small noise, like a depth map
            n = rnd(seed, 7);
            blk[r][c] = PIX_W'(pbit(p, r, c) ? v1 + n - 3 : v0 + n);
          end
          1: blk[r][c] = PIX_W'(rnd(seed, 256));
          default: blk[r][c] = PIX_W'(v0);
        endcase
      end
  endtask

  // ----------------------------------------------------- mechanism counters
  int unsigned n_fill = 0, n_pred = 0, n_sad = 0, n_interlace = 0;
  int unsigned n_push = 0, n_pop = 0, n_improve = 0, n_res_cols = 0;
  int unsigned n_upsampled = 0;

  always @(negedge clk) if (rst_n) begin
    if (u_dut.load_en) n_fill++;
    if (u_dut.iss_valid && u_dut.iss_stage == STG_PRED) n_pred++;
    if (u_dut.iss_valid && u_dut.iss_stage == STG_SAD) begin
      n_sad++;
      if (u_dut.u_ctrl.pred_cnt != NUM_PAT) n_interlace++;
    end
    if (u_dut.fifo_push) n_push++;
    if (u_dut.fifo_pop) n_pop++;
    if (u_dut.u_cmp.improved) n_improve++;
    if (res_valid) n_res_cols++;
    if (S > 1 && u_dut.tok[0].valid) n_upsampled++;
  end

  // ----------------------------------------------------- residue monitor
  int unsigned next_col;
  int unsigned done_cyc;
  bit          seen_done;

  always @(negedge clk) if (rst_n) begin
    if (res_valid) begin
      check(res_col == RW'(next_col), $sformatf("residue column order %0d/%0d", res_col, next_col));
      for (int r = 0; r < int'(N); r++) begin
        int exp_res;
        exp_res = int'(blk[r][res_col]) - int'(pbit(ref_idx, r, int'(res_col)) ? ref_a1 : ref_a0);
        check(int'(res_data[r]) == exp_res,
              $sformatf("residue r%0d c%0d got %0d exp %0d", r, res_col, res_data[r], exp_res));
      end
      next_col++;
    end
    if (done) begin
      seen_done = 1'b1;
      done_cyc  = cyc;
    end
  end

  // ----------------------------------------------------- stimulus
  initial begin
    int unsigned start_cyc, imp_before;
    for (int c = 0; c < int'(N); c++) row_pixels[c] = '0;
    build_table();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int unsigned p = 0; p < NUM_PAT; p++) begin
      pat_wr_en   = 1'b1;
      pat_wr_addr = IW'(p);
      pat_wr_data = pats[p];
      @(negedge clk);
    end
    pat_wr_en = 1'b0;
    @(negedge clk);

    for (int b = 0; b < int'(NBLK); b++) begin
      make_block(b % 3);
      reference();
      next_col  = 0;
      seen_done = 1'b0;
      imp_before = n_improve;
      check(row_ready, "encoder ready for a block");
      start_cyc = cyc;
      for (int r = 0; r < int'(N); r++) begin
        row_valid = 1'b1;
        for (int c = 0; c < int'(N); c++) row_pixels[c] = blk[r][c];
        @(negedge clk);
      end
      row_valid = 1'b0;
      check(busy && !row_ready, "encoder busy after the last row");
      while (!seen_done) @(negedge clk);
      check(done_cyc - start_cyc + 1 == EXP_CYC,
            $sformatf("block %0d took %0d cycles, expected %0d", b, done_cyc - start_cyc + 1, EXP_CYC));
      check(next_col == N, $sformatf("block %0d gave %0d residue columns", b, next_col));
      check(best_idx == IW'(ref_idx), $sformatf("block %0d best pattern %0d exp %0d", b, best_idx, ref_idx));
      check(best_sad == (SW+1)'(ref_sad), $sformatf("block %0d best SAD %0d exp %0d", b, best_sad, ref_sad));
      check(best_avg0 == PIX_W'(ref_a0) && best_avg1 == PIX_W'(ref_a1),
            $sformatf("block %0d averages %0d/%0d exp %0d/%0d", b, best_avg0, best_avg1, ref_a0, ref_a1));
      check(n_improve - imp_before == ref_improvements,
            $sformatf("block %0d comparator updates %0d exp %0d", b, n_improve - imp_before, ref_improvements));
      $display("block %0d: kind %0d best %0d SAD %0d avg %0d/%0d, %0d cycles",
               b, b % 3, best_idx, best_sad, best_avg0, best_avg1, done_cyc - start_cyc + 1);
      @(negedge clk);
    end

    check(n_fill == NBLK * N, "row fill count");
    check(n_pred == NBLK * NUM_PAT && n_sad == NBLK * NUM_PAT, "prediction and SAD step counts");
    check(n_push == NBLK * NUM_PAT && n_pop == NBLK * NUM_PAT, "register bank traffic");
    check(n_res_cols == NBLK * N, "residue column count");
    $display("mechanisms: fill %0d pred %0d sad %0d interlaced %0d bank push %0d pop %0d best-updates %0d residue-cols %0d upsampled %0d",
             n_fill, n_pred, n_sad, n_interlace, n_push, n_pop, n_improve, n_res_cols, n_upsampled);
    check(n_fill > 0, "mechanism: row fill");
    check(n_pred > 0, "mechanism: prediction step");
    check(n_sad > 0, "mechanism: SAD step");
    check(n_interlace > 0, "mechanism: interlaced prediction/SAD");
    check(n_push > 0 && n_pop > 0, "mechanism: register bank feedback");
    check(n_improve > 0, "mechanism: comparator best update");
    check(n_res_cols > 0, "mechanism: residue stage");
    if (S > 1) check(n_upsampled > 0, "mechanism: pattern upsampling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
