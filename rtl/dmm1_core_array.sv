// dmm1_core_array: the N x N array of D-Cores.
//
// Pixels enter one row per clock: when `load_en` is high, the N samples on
// `pixel_row` are latched by the cores of row `load_row`. Inside a row the
// cores form a chain from west (column 0) to east (column N-1): NEXT_0/NEXT_1
// of one core feed PREVIOUS_0/PREVIOUS_1 of the next, each through a register,
// so a row holds N patterns in flight, one per column. Column 0 starts from 0.
// All cores of a column work on the same pattern at the same time, so the
// step code, the two region averages and the pattern bits are given per
// column (`col_bits[c][r]` is the bit of row r, column c); the caller delays
// them by c clocks for column c. `east0/east1[r]` are the registered outputs of
// the eastern core of row r, valid N clocks after column 0 saw the pattern.
// In the residue stage the predicted sample of each core is the average of
// the region its bit selects; `residue[r][c]` is valid one clock after column
// c saw the residue step. The array layout follows the published design; the
// per-column sideband and the PRED selection inside the array are choices of
// this design.
module dmm1_core_array
  import dmm1_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned SW = sum_width(N),
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    load_en,
  input  logic [RW-1:0]           load_row,
  input  logic [PIX_W-1:0]        pixel_row [N],
  input  stage_e                  col_stage [N],
  input  logic [N-1:0]            col_bits  [N],
  input  logic [PIX_W-1:0]        col_avg0  [N],
  input  logic [PIX_W-1:0]        col_avg1  [N],
  output logic [SW-1:0]           east0     [N],
  output logic [SW-1:0]           east1     [N],
  output logic signed [RES_W-1:0] residue   [N][N]
);

  // chain[r][c] carries the output of core (r, c-1); chain[r][0] is zero.
  logic [SW-1:0] chain0 [N][N+1];
  logic [SW-1:0] chain1 [N][N+1];

  for (genvar r = 0; r < N; r++) begin : g_row
    assign chain0[r][0] = '0;
    assign chain1[r][0] = '0;
    for (genvar c = 0; c < N; c++) begin : g_col
      logic [PIX_W-1:0] pred;
      assign pred = col_bits[c][r] ? col_avg1[c] : col_avg0[c];
      dmm1_dcore #(.SW(SW)) u_core (
        .clk      (clk),
        .load     (load_en && (load_row == RW'(r))),
        .pixel_in (pixel_row[c]),
        .stage    (col_stage[c]),
        .region   (col_bits[c][r]),
        .prev0    (chain0[r][c]),
        .prev1    (chain1[r][c]),
        .avg0     (col_avg0[c]),
        .avg1     (col_avg1[c]),
        .pred     (pred),
        .next0    (chain0[r][c+1]),
        .next1    (chain1[r][c+1]),
        .residue  (residue[r][c])
      );
    end
    assign east0[r] = chain0[r][N];
    assign east1[r] = chain1[r][N];
  end

endmodule
