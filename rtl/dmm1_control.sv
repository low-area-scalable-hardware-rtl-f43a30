// dmm1_control: sequencer of the DMM-1 encoder.
//
// LOAD: accepts one row of N samples per clock (row_valid/row_ready handshake)
//   until the N rows of a block are in the D-Cores; then clears the
//   comparator and enters RUN.
// RUN: interlaces the two steps on alternate clocks. On even clocks it issues
//   the prediction step of the next pattern (index 0, 1, ... NUM_PAT-1); on
//   odd clocks, if the register bank holds a pattern whose region averages are
//   ready, it pops it and issues that pattern's SAD step. Each issued step
//   enters column 0 of the array one clock later. When `sad_done` has counted
//   NUM_PAT SAD results, the comparator holds the best wedgelet and the
//   residue stage is issued once.
// RESID: waits for `res_last`, the last residue column, then returns to LOAD.
// The interlacing of prediction and SAD steps and the fill-process-residue
// order follow the published design; the even/odd issue slots and the
// handshake are choices of this design.
module dmm1_control
  import dmm1_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned NUM_PAT = 384,
  localparam int unsigned RW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned IW     = (NUM_PAT > 1) ? $clog2(NUM_PAT) : 1,
  localparam int unsigned KW     = $clog2(NUM_PAT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          row_valid,
  output logic          row_ready,
  output logic          load_en,
  output logic [RW-1:0] load_row,
  input  logic          fifo_empty,
  output logic          fifo_pop,
  input  logic          sad_done,
  input  logic          res_last,
  output logic          cmp_clear,
  output logic          iss_valid,
  output stage_e        iss_stage,
  output logic [IW-1:0] iss_idx,
  output logic          busy
);

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_RESID} state_e;

  state_e        state;
  logic          phase;
  logic [KW-1:0] pred_cnt;
  logic [KW-1:0] sad_cnt;

  assign row_ready = (state == S_LOAD);
  assign load_en   = row_valid && row_ready;
  assign busy      = (state != S_LOAD);
  assign cmp_clear = load_en && (load_row == RW'(N - 1));
  assign iss_idx   = IW'(pred_cnt);

  always_comb begin
    iss_valid = 1'b0;
    iss_stage = STG_PRED;
    fifo_pop  = 1'b0;
    if (state == S_RUN) begin
      if (sad_cnt == KW'(NUM_PAT)) begin
        iss_valid = 1'b1;
        iss_stage = STG_RES;
      end else if (!phase) begin
        iss_valid = (pred_cnt != KW'(NUM_PAT));
        iss_stage = STG_PRED;
      end else if (!fifo_empty) begin
        iss_valid = 1'b1;
        iss_stage = STG_SAD;
        fifo_pop  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      load_row <= '0;
      phase    <= 1'b0;
      pred_cnt <= '0;
      sad_cnt  <= '0;
    end else begin
      unique case (state)
        S_LOAD: begin
          phase    <= 1'b0;
          pred_cnt <= '0;
          sad_cnt  <= '0;
          if (load_en) begin
            load_row <= (load_row == RW'(N - 1)) ? '0 : load_row + 1'b1;
            if (load_row == RW'(N - 1)) state <= S_RUN;
          end
        end
        S_RUN: begin
          phase <= !phase;
          if (iss_valid && iss_stage == STG_PRED) pred_cnt <= pred_cnt + 1'b1;
          if (sad_done) sad_cnt <= sad_cnt + 1'b1;
          if (iss_valid && iss_stage == STG_RES) state <= S_RESID;
        end
        S_RESID: begin
          if (res_last) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  a_sad_not_early: assert property (@(posedge clk) disable iff (!rst_n)
                                    sad_done |-> state == S_RUN);

endmodule
