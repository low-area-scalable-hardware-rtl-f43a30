// tb_dmm1_divider: a region divider fed by the division-value memory for
// 32x32 blocks. Random region sizes and region sums (at most 255 per sample,
// with the extremes included) must give round-half-up(sum / count) one clock
// later; an empty region must give 0.
module tb_dmm1_divider;
  localparam int unsigned SW = 18;
  localparam int unsigned CW = 11;
  localparam int unsigned MW = SW + 1 + CW + 1;

  logic clk = 0;
  logic [SW-1:0] sum = 0;
  logic [CW-1:0] count = 0, cnt_unused = 0;
  logic [MW-1:0] recip, recip_unused;
  logic [7:0] avg;

  dmm1_divider_mem #(.MAXCNT(1024), .XW(SW + 1)) u_mem (
    .cnt0(count), .cnt1(cnt_unused), .recip0(recip), .recip1(recip_unused));
  dmm1_divider #(.SW(SW), .CW(CW)) dut (.clk, .sum, .count, .recip, .avg);

  always #5 clk = !clk;
  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned k, s, e;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      k = (i % 50 == 0) ? 1024 : (i % 50 == 1) ? 1 : (i % 50 == 2) ? 0 : 1 + $urandom % 1024;
      s = (i % 7 == 0) ? k * 255 : (i % 7 == 1) ? 0 : $urandom % (k * 255 + 1);
      count = CW'(k); sum = SW'(s);
      e = (k == 0) ? 0 : (s + k / 2) / k;
      @(negedge clk);
      checks++;
      if (avg != 8'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d -> %0d exp %0d", s, k, avg, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
