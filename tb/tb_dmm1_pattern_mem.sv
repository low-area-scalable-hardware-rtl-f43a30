// tb_dmm1_pattern_mem: writes random patterns into two pattern memories, one
// at full resolution (8x8 patterns for 8x8 blocks) and one storing 4x4
// patterns for 8x8 blocks (each bit covers 2x2 samples), then reads random
// addresses on every column port and checks the expanded column bits one
// clock later.
module tb_dmm1_pattern_mem;
  localparam int unsigned N = 8;
  localparam int unsigned NP = 10;

  logic clk = 0;
  logic wr_en = 0;
  logic [3:0] wr_addr = 0;
  logic [63:0] wr_data_a = 0;
  logic [15:0] wr_data_b = 0;
  logic [3:0] rd_addr [N];
  logic [N-1:0] rd_a [N], rd_b [N];

  dmm1_pattern_mem #(.N(N), .PR(8), .NUM_PAT(NP)) dut_a (
    .clk, .wr_en, .wr_addr, .wr_data(wr_data_a), .rd_addr, .rd_data(rd_a));
  dmm1_pattern_mem #(.N(N), .PR(4), .NUM_PAT(NP)) dut_b (
    .clk, .wr_en, .wr_addr, .wr_data(wr_data_b), .rd_addr, .rd_data(rd_b));

  always #5 clk = !clk;
  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] pa [NP];
  logic [15:0] pbt [NP];

  initial begin
    for (int c = 0; c < int'(N); c++) rd_addr[c] = 0;
    @(negedge clk);
    for (int p = 0; p < int'(NP); p++) begin
      pa[p] = {$urandom, $urandom}; pbt[p] = 16'($urandom);
      wr_en = 1; wr_addr = 4'(p); wr_data_a = pa[p]; wr_data_b = pbt[p];
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 200; i++) begin
      int a [N];
      for (int c = 0; c < int'(N); c++) begin a[c] = $urandom % NP; rd_addr[c] = 4'(a[c]); end
      @(negedge clk);
      for (int c = 0; c < int'(N); c++)
        for (int r = 0; r < int'(N); r++) begin
          checks += 2;
          if (rd_a[c][r] != pa[a[c]][r*8 + c]) failures++;
          if (rd_b[c][r] != pbt[a[c]][(r/2)*4 + c/2]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
