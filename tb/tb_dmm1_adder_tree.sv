// tb_dmm1_adder_tree: two adder trees, 5 inputs (not a power of two) and 32
// inputs, driven with random values each clock; each sum must appear one
// clock later.
module tb_dmm1_adder_tree;
  localparam int unsigned W = 18;
  logic clk = 0;
  logic [W-1:0] in5 [5], in32 [32], s5, s32;

  dmm1_adder_tree #(.N(5), .W(W)) dut5 (.clk, .in(in5), .sum(s5));
  dmm1_adder_tree #(.N(32), .W(W)) dut32 (.clk, .in(in32), .sum(s32));

  always #5 clk = !clk;
  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e5, e32;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      e5 = 0; e32 = 0;
      foreach (in5[j])  begin in5[j]  = W'($urandom % 8161); e5  += in5[j];  end
      foreach (in32[j]) begin in32[j] = W'($urandom % 8161); e32 += in32[j]; end
      @(negedge clk);
      checks += 2;
      if (s5 != W'(e5)) failures++;
      if (s32 != W'(e32)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
