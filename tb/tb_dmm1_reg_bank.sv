// tb_dmm1_reg_bank: random pushes and pops (never pushing into a full bank
// without popping, never popping an empty one) against a queue model; checks
// the head entry, empty and full every clock and that the bank was filled.
module tb_dmm1_reg_bank;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned IW = 9;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [IW-1:0] push_idx = 0, head_idx;
  logic [7:0] push_avg0 = 0, push_avg1 = 0, head_avg0, head_avg1;
  logic empty, full;

  dmm1_reg_bank #(.DEPTH(DEPTH), .IW(IW)) dut (.*);

  always #5 clk = !clk;
  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IW+15:0] q [$];
    int unsigned n_full = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      pop  = (q.size() > 0) && ($urandom % 2);
      push = ($urandom % 2) && (q.size() < DEPTH || pop);
      push_idx = IW'($urandom); push_avg0 = 8'($urandom); push_avg1 = 8'($urandom);
      if (pop) void'(q.pop_front());
      if (push) q.push_back({push_idx, push_avg0, push_avg1});
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH)) failures++;
      if (full) n_full++;
      if (q.size() > 0) begin
        checks++;
        if ({head_idx, head_avg0, head_avg1} != q[0]) failures++;
      end
    end
    checks++; if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
