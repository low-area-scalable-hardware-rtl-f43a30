// tb_dmm1_comparator: sends sequences of random SAD pairs (drawn from a small
// range so that ties happen) with random idle clocks, clears between
// sequences, and checks the kept best SAD, index, averages and the `improved`
// pulse against a model that keeps the first of equal SADs.
module tb_dmm1_comparator;
  localparam int unsigned SW = 18;
  localparam int unsigned IW = 9;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [SW-1:0] sad0 = 0, sad1 = 0;
  logic [IW-1:0] idx = 0;
  logic [7:0] avg0 = 0, avg1 = 0;
  logic [SW:0] best_sad;
  logic [IW-1:0] best_idx;
  logic [7:0] best_avg0, best_avg1;
  logic have_best, improved;

  dmm1_comparator #(.SW(SW), .IW(IW)) dut (.*);

  always #5 clk = !clk;
  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned bs, bi, b0, b1, s, n_ties;
    bit have, imp;
    n_ties = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int seq = 0; seq < 40; seq++) begin
      clear = 1; @(negedge clk); clear = 0;
      have = 0;
      checks++; if (have_best) failures++;
      for (int p = 0; p < 100; p++) begin
        valid = ($urandom % 4) != 0;
        sad0 = SW'($urandom % 30); sad1 = SW'($urandom % 30);
        idx = IW'(p); avg0 = 8'($urandom); avg1 = 8'($urandom);
        s = sad0 + sad1;
        imp = 0;
        if (valid && have && s == bs) n_ties++;
        if (valid && (!have || s < bs)) begin
          imp = have;
          have = 1; bs = s; bi = p; b0 = avg0; b1 = avg1;
        end
        @(negedge clk);
        checks++;
        if (have_best != have || improved != imp) failures++;
        if (have) begin
          checks++;
          if (best_sad != (SW+1)'(bs) || best_idx != IW'(bi) || best_avg0 != 8'(b0) || best_avg1 != 8'(b1)) begin
            failures++;
            if (failures < 10) $display("FAIL seq %0d p %0d: %0d/%0d exp %0d/%0d", seq, p, best_sad, best_idx, bs, bi);
          end
        end
      end
      valid = 0;
    end
    checks++; if (n_ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
