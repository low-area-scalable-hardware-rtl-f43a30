// tb_dmm1_core_array: 4x4 array test. Loads a random block row by row, then
// streams a sequence of random patterns, each skewed by one clock per column,
// with random prediction/SAD steps and averages, and checks the two east
// outputs of every row N clocks later against per-row sums computed here.
// It ends with a residue step on all columns and checks every residue.
module tb_dmm1_core_array;
  import dmm1_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned SW = sum_width(N);
  localparam int unsigned NP = 200;

  logic clk = 0, load_en = 0;
  logic [1:0] load_row = 0;
  logic [7:0] pixel_row [N];
  stage_e col_stage [N];
  logic [N-1:0] col_bits [N];
  logic [7:0] col_avg0 [N], col_avg1 [N];
  logic [SW-1:0] east0 [N], east1 [N];
  logic signed [8:0] residue [N][N];

  dmm1_core_array #(.N(N)) dut (.*);

  always #5 clk = !clk;
  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] blk [N][N];
  logic [N-1:0] pb [NP][N];   // pb[p][c][r]
  stage_e ps [NP];
  logic [7:0] pa0 [NP], pa1 [NP];

  task automatic expect_row(input int p);
    int s0, s1, a, t;
    for (int r = 0; r < int'(N); r++) begin
      s0 = 0; s1 = 0;
      for (int c = 0; c < int'(N); c++) begin
        a = pb[p][c][r] ? pa1[p] : pa0[p];
        t = (ps[p] == STG_SAD) ? ((blk[r][c] > a) ? blk[r][c] - a : a - blk[r][c]) : blk[r][c];
        if (pb[p][c][r]) s1 += t; else s0 += t;
      end
      checks++;
      if (east0[r] != SW'(s0) || east1[r] != SW'(s1)) begin
        failures++;
        $display("FAIL pattern %0d row %0d: %0d/%0d exp %0d/%0d", p, r, east0[r], east1[r], s0, s1);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < int'(NP); p++) begin
      for (int c = 0; c < int'(N); c++) pb[p][c] = N'($urandom);
      ps[p] = ($urandom % 2) ? STG_SAD : STG_PRED;
      pa0[p] = 8'($urandom); pa1[p] = 8'($urandom);
    end
    for (int c = 0; c < int'(N); c++) begin
      col_stage[c] = STG_PRED; col_bits[c] = '0; col_avg0[c] = 0; col_avg1[c] = 0; pixel_row[c] = 0;
    end
    @(negedge clk);
    for (int r = 0; r < int'(N); r++) begin
      load_en = 1; load_row = 2'(r);
      for (int c = 0; c < int'(N); c++) begin blk[r][c] = 8'($urandom); pixel_row[c] = blk[r][c]; end
      @(negedge clk);
    end
    load_en = 0;
    for (int t = 0; t < int'(NP + N); t++) begin
      if (t >= int'(N)) expect_row(t - int'(N));
      for (int c = 0; c < int'(N); c++) begin
        int p;
        p = t - c;
        if (p >= 0 && p < int'(NP)) begin
          col_stage[c] = ps[p]; col_bits[c] = pb[p][c]; col_avg0[c] = pa0[p]; col_avg1[c] = pa1[p];
        end else begin
          col_stage[c] = STG_PRED; col_bits[c] = '0;
        end
      end
      @(negedge clk);
    end
    // residue stage on all columns at once
    for (int c = 0; c < int'(N); c++) begin
      col_stage[c] = STG_RES; col_bits[c] = pb[0][c]; col_avg0[c] = pa0[0]; col_avg1[c] = pa1[0];
    end
    @(negedge clk);
    for (int c = 0; c < int'(N); c++) col_stage[c] = STG_PRED;
    @(negedge clk);
    for (int r = 0; r < int'(N); r++)
      for (int c = 0; c < int'(N); c++) begin
        int e;
        e = int'(blk[r][c]) - int'(pb[0][c][r] ? pa1[0] : pa0[0]);
        checks++;
        if (int'(residue[r][c]) != e) begin failures++; $display("FAIL residue %0d,%0d", r, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
