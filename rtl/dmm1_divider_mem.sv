// dmm1_divider_mem: the division-value memory.
//
// A read-only table of reciprocals, one per possible region sample count k:
//   recip[k] = ceil(2^SH / k),  recip[0] = 0,  SH = XW + CW,
// where XW is the width of the dividend and CW the width of a count. With this
// SH, (x * recip[k]) >> SH equals floor(x / k) exactly for every x < 2^XW and
// 1 <= k <= MAXCNT (the product's error term stays below 1/k). The table is
// filled at elaboration from that formula. It has two combinational read
// ports, one per region divider. That the memory holds reciprocals indexed by
// the region size is a choice of this design; the published design only
// names a memory of division values.
module dmm1_divider_mem #(
  parameter int unsigned MAXCNT = 1024,
  parameter int unsigned XW     = 19,
  localparam int unsigned CW    = $clog2(MAXCNT + 1),
  localparam int unsigned SH    = XW + CW,
  localparam int unsigned MW    = SH + 1
) (
  input  logic [CW-1:0] cnt0,
  input  logic [CW-1:0] cnt1,
  output logic [MW-1:0] recip0,
  output logic [MW-1:0] recip1
);

  logic [MW-1:0] rom [MAXCNT+1];

  initial begin
    rom[0] = '0;
    for (int unsigned k = 1; k <= MAXCNT; k++) begin
      rom[k] = MW'(((64'd1 << SH) + 64'(k) - 64'd1) / 64'(k));
    end
  end

  assign recip0 = (cnt0 <= CW'(MAXCNT)) ? rom[cnt0] : '0;
  assign recip1 = (cnt1 <= CW'(MAXCNT)) ? rom[cnt1] : '0;

endmodule
