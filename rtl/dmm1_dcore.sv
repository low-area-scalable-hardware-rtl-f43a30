// dmm1_dcore: one D-Core of the DMM-1 array, holding one depth sample.
//
// The core latches PIXEL_IN when `load` is high and keeps it for the whole
// block. Every cycle it adds a term to the partial result arriving from its
// western neighbour and registers the result towards its eastern neighbour:
//   prediction step (stage[1]=0): term = pixel, added to the channel of the
//     core's region (prev0 -> next0 for region 0, prev1 -> next1 for region 1);
//     the other channel passes unchanged.
//   SAD step (stage = 2'b10): term = |pixel - AVG of the core's region|, added
//     to the channel of the core's region.
//   residue stage (stage[0]=1): RESIDUE <= pixel - PRED, a signed 9-bit value;
//     RESIDUE holds its value outside this stage.
// `region` is this core's bit of the wedgelet pattern in flight. Latency from
// prev*/region/stage to next*/residue is one clock. The step behaviour, the
// STAGE coding and the signal names follow the published D-Core; splitting
// SADs into two region channels that are added later, and the widths, are
// choices of this design. No reset: every register is written before it is read.
module dmm1_dcore
  import dmm1_pkg::*;
#(
  parameter int unsigned SW = 18            // width of the partial-sum channels
) (
  input  logic                    clk,
  input  logic                    load,
  input  logic [PIX_W-1:0]        pixel_in,
  input  stage_e                  stage,
  input  logic                    region,
  input  logic [SW-1:0]           prev0,
  input  logic [SW-1:0]           prev1,
  input  logic [PIX_W-1:0]        avg0,
  input  logic [PIX_W-1:0]        avg1,
  input  logic [PIX_W-1:0]        pred,
  output logic [SW-1:0]           next0,
  output logic [SW-1:0]           next1,
  output logic signed [RES_W-1:0] residue
);

  logic [PIX_W-1:0] pix;
  logic [PIX_W-1:0] avg_sel;
  logic [PIX_W-1:0] abs_diff;
  logic [SW-1:0]    term;
  logic [1:0]       stg;

  assign stg = stage;

  always_ff @(posedge clk) begin
    if (load) pix <= pixel_in;
  end

  always_comb begin
    avg_sel  = region ? avg1 : avg0;
    abs_diff = (pix >= avg_sel) ? (pix - avg_sel) : (avg_sel - pix);
    term     = stg[1] ? SW'(abs_diff) : SW'(pix);
  end

  always_ff @(posedge clk) begin
    next0 <= region ? prev0 : prev0 + term;
    next1 <= region ? prev1 + term : prev1;
    if (stg[0]) residue <= $signed({1'b0, pix}) - $signed({1'b0, pred});
  end

endmodule
