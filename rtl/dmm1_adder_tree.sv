// dmm1_adder_tree: adds the N east-column outputs of one region channel.
//
// A balanced binary tree of adders over the N inputs (padded with zeros to a
// power of two), registered once at the output, so that all row results are
// added in one pipeline stage: `sum` is valid one clock after `in`. The sum of
// one region over a block always fits W bits. The tree shape is a choice of
// this design; the single pipeline stage follows the published design.
module dmm1_adder_tree #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic [W-1:0] in [N],
  output logic [W-1:0] sum
);

  localparam int unsigned L  = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P2 = 1 << L;

  // level l holds P2 >> l partial sums
  logic [W-1:0] lvl [L+1][P2];

  always_comb begin
    for (int l = 0; l <= int'(L); l++)
      for (int i = 0; i < int'(P2); i++) lvl[l][i] = '0;
    for (int i = 0; i < int'(N); i++) lvl[0][i] = in[i];
    for (int l = 1; l <= int'(L); l++)
      for (int i = 0; i < int'(P2 >> l); i++)
        lvl[l][i] = lvl[l-1][2*i] + lvl[l-1][2*i+1];
  end

  always_ff @(posedge clk) sum <= lvl[L][0];

endmodule
