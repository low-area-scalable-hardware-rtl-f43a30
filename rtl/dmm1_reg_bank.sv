// dmm1_reg_bank: register bank between the prediction and the SAD step.
//
// A small first-in first-out bank of registers. When the dividers finish the
// prediction step of a pattern, its index and two region averages are pushed;
// the controller pops the oldest entry when it starts that pattern's SAD step
// and feeds it back to the D-Cores. `head_*` shows the oldest entry whenever
// `empty` is low. Push and pop in the same clock are allowed. Pushing when
// full or popping when empty is a protocol error, flagged by assertions.
// Organising the bank as a FIFO is a choice of this design.
module dmm1_reg_bank
  import dmm1_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned IW    = 9,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [IW-1:0]    push_idx,
  input  logic [PIX_W-1:0] push_avg0,
  input  logic [PIX_W-1:0] push_avg1,
  input  logic             pop,
  output logic [IW-1:0]    head_idx,
  output logic [PIX_W-1:0] head_avg0,
  output logic [PIX_W-1:0] head_avg1,
  output logic             empty,
  output logic             full
);

  typedef struct packed {
    logic [IW-1:0]    idx;
    logic [PIX_W-1:0] avg0;
    logic [PIX_W-1:0] avg1;
  } entry_t;

  entry_t         regs [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic [AW:0]    count;

  assign empty     = (count == '0);
  assign full      = (count == (AW+1)'(DEPTH));
  assign head_idx  = regs[rd_ptr].idx;
  assign head_avg0 = regs[rd_ptr].avg0;
  assign head_avg1 = regs[rd_ptr].avg1;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) regs[wr_ptr] <= '{idx: push_idx, avg0: push_avg0, avg1: push_avg1};
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
