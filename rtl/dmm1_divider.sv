// dmm1_divider: one region divider, average = round(sum / count).
//
// The rounded quotient is formed as ((sum + count/2) * recip) >> SH, recip
// being the reciprocal of `count` read from the division-value memory. The
// result is registered: `avg` is valid one clock after `sum`, `count` and
// `recip`. An empty region (count 0, recip 0) gives 0. A region average of
// 8-bit samples never exceeds 255. Computing the average with a reciprocal
// multiply and rounding half up are choices of this design.
module dmm1_divider
  import dmm1_pkg::*;
#(
  parameter int unsigned SW = 18,           // width of the region sum
  parameter int unsigned CW = 11,           // width of the region count
  localparam int unsigned XW = SW + 1,
  localparam int unsigned SH = XW + CW,
  localparam int unsigned MW = SH + 1
) (
  input  logic             clk,
  input  logic [SW-1:0]    sum,
  input  logic [CW-1:0]    count,
  input  logic [MW-1:0]    recip,
  output logic [PIX_W-1:0] avg
);

  logic [XW-1:0]    dividend;
  logic [XW+MW-1:0] product;

  always_comb begin
    dividend = XW'(sum) + XW'(count >> 1);
    product  = (XW+MW)'(dividend) * (XW+MW)'(recip);
  end

  always_ff @(posedge clk) avg <= PIX_W'(product >> SH);

endmodule
