// dmm1_pattern_mem: the wedgelet pattern memory.
//
// Holds NUM_PAT binary wedgelet patterns of PR x PR bits (Table-3 sizing: 58 x
// 4x4, 314 x 8x8, 384 x 16x16; a 32x32 block uses the 16x16 patterns, each
// stored bit covering an S x S square, S = N/PR). The memory is split into PR
// column banks of PR bits so that every array column can read its own pattern
// with its own address: the array works on a different pattern in each
// column. Read port c returns, one clock after `rd_addr[c]`, the N bits of
// array column c, already expanded to N rows. A whole pattern is written at
// once through `wr_*`, bit r*PR+c being row r, column c; the pattern table is
// loaded by the host after reset, since its contents are fixed by the coding
// standard's wedgelet generation rather than by this hardware. Memory sizes
// follow the published figures; the banking and the write port are choices of
// this design.
module dmm1_pattern_mem #(
  parameter int unsigned N       = 32,
  parameter int unsigned PR      = (N > 16) ? 16 : N,
  parameter int unsigned NUM_PAT = 384,
  localparam int unsigned IW     = (NUM_PAT > 1) ? $clog2(NUM_PAT) : 1
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [IW-1:0]      wr_addr,
  input  logic [PR*PR-1:0]   wr_data,
  input  logic [IW-1:0]      rd_addr [N],
  output logic [N-1:0]       rd_data [N]
);

  localparam int unsigned S = N / PR;

  for (genvar b = 0; b < PR; b++) begin : g_bank
    logic [PR-1:0] mem [NUM_PAT];
    logic [PR-1:0] wcol;

    always_comb begin
      for (int r = 0; r < PR; r++) wcol[r] = wr_data[r*PR + b];
    end

    always_ff @(posedge clk) begin
      if (wr_en) mem[wr_addr] <= wcol;
    end

    // the S array columns covered by bank b
    for (genvar k = 0; k < S; k++) begin : g_port
      localparam int unsigned C = b * S + k;
      logic [PR-1:0] q;
      always_ff @(posedge clk) q <= mem[rd_addr[C]];
      always_comb begin
        for (int r = 0; r < N; r++) rd_data[C][r] = q[r / S];
      end
    end
  end

  initial begin
    assert (N % PR == 0) else $error("dmm1_pattern_mem: N must be a multiple of PR");
  end

endmodule
