// dmm1_comparator: keeps the best (lowest-SAD) wedgelet of a block.
//
// `clear` forgets the previous block. Every clock with `valid` high, the SAD
// of the two region channels (sad0 + sad1) of pattern `idx` is compared with
// the best so far; a strictly lower SAD, or the first SAD after `clear`,
// replaces the stored best SAD, pattern index and the pattern's two region
// averages. Ties keep the earlier pattern. Outputs are registered and valid
// the clock after the last `valid`. `improved` pulses with each replacement.
// Keeping the first of equal SADs is a choice of this design.
module dmm1_comparator
  import dmm1_pkg::*;
#(
  parameter int unsigned SW = 18,
  parameter int unsigned IW = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic [SW-1:0]    sad0,
  input  logic [SW-1:0]    sad1,
  input  logic [IW-1:0]    idx,
  input  logic [PIX_W-1:0] avg0,
  input  logic [PIX_W-1:0] avg1,
  output logic [SW:0]      best_sad,
  output logic [IW-1:0]    best_idx,
  output logic [PIX_W-1:0] best_avg0,
  output logic [PIX_W-1:0] best_avg1,
  output logic             have_best,
  output logic             improved
);

  logic [SW:0] sad;
  logic        take;

  always_comb begin
    sad  = {1'b0, sad0} + {1'b0, sad1};
    take = valid && (!have_best || (sad < best_sad));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_best <= 1'b0;
      best_sad  <= '0;
      best_idx  <= '0;
      best_avg0 <= '0;
      best_avg1 <= '0;
      improved  <= 1'b0;
    end else begin
      improved <= 1'b0;
      if (clear) begin
        have_best <= 1'b0;
      end else if (take) begin
        have_best <= 1'b1;
        best_sad  <= sad;
        best_idx  <= idx;
        best_avg0 <= avg0;
        best_avg1 <= avg1;
        improved  <= have_best;
      end
    end
  end

endmodule
