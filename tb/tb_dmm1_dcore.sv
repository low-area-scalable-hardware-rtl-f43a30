// tb_dmm1_dcore: random test of one D-Core. Each clock it loads a random
// sample or keeps the old one, drives a random step code, region bit,
// partial sums and averages, and checks next0/next1/residue one clock later
// against a model of the three steps; the residue must hold outside the
// residue stage.
module tb_dmm1_dcore;
  import dmm1_pkg::*;
  localparam int unsigned SW = 18;

  logic clk = 0, load = 0, region = 0;
  logic [7:0] pixel_in = 0, avg0 = 0, avg1 = 0, pred = 0;
  stage_e stage = STG_PRED;
  logic [SW-1:0] prev0 = 0, prev1 = 0, next0, next1;
  logic signed [8:0] residue;

  dmm1_dcore #(.SW(SW)) dut (.*);

  always #5 clk = !clk;
  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix, e0, e1, eres, a, term;
    @(negedge clk);
    load = 1; pixel_in = 8'd77; @(negedge clk); pix = 77;
    eres = 0;
    for (int i = 0; i < 2000; i++) begin
      load     = ($urandom % 4) == 0;
      pixel_in = 8'($urandom);
      stage    = stage_e'($urandom % 3);
      region   = 1'($urandom);
      prev0    = SW'($urandom % 200000);
      prev1    = SW'($urandom % 200000);
      avg0     = 8'($urandom);
      avg1     = 8'($urandom);
      pred     = 8'($urandom);
      a    = region ? avg1 : avg0;
      term = (stage == STG_SAD) ? ((pix > a) ? pix - a : a - pix) : pix;
      e0   = region ? prev0 : prev0 + term;
      e1   = region ? prev1 + term : prev1;
      if (stage == STG_RES) eres = pix - pred;
      @(negedge clk);
      if (stage != STG_RES) begin
        checks++; if (next0 != SW'(e0)) begin failures++; $display("FAIL next0 %0d exp %0d", next0, e0); end
        checks++; if (next1 != SW'(e1)) begin failures++; $display("FAIL next1 %0d exp %0d", next1, e1); end
      end
      if (i > 3) begin
        checks++; if (int'(residue) != eres) begin failures++; $display("FAIL residue %0d exp %0d", residue, eres); end
      end
      if (load) pix = pixel_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
