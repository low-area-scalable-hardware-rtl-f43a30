// tb_dmm1_control: the sequencer for 4x4 blocks and 6 patterns, with the data
// path replaced by delay models: a prediction step reaches the register bank
// 7 clocks after issue, a SAD step reaches the comparator 6 clocks after
// issue, and the last residue column leaves 5 clocks after the residue step.
// Checks the row handshake and row numbers, the comparator clear, the
// prediction indices in order on even clocks, SAD steps only on odd clocks
// with an entry available, one residue step after the last SAD result, the
// return to loading, and the cycle count of a block.
module tb_dmm1_control;
  import dmm1_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned NP = 6;

  logic clk = 0, rst_n = 0, row_valid = 0, row_ready, load_en;
  logic [1:0] load_row;
  logic fifo_empty, fifo_pop, sad_done, res_last, cmp_clear, iss_valid, busy;
  stage_e iss_stage;
  logic [2:0] iss_idx;

  dmm1_control #(.N(N), .NUM_PAT(NP)) dut (.*);

  always #5 clk = !clk;
  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data path delay model
  int unsigned bank = 0;
  bit pred_pipe [8], sad_pipe [7], res_pipe [6];
  assign fifo_empty = (bank == 0);
  assign sad_done = sad_pipe[6];
  assign res_last = res_pipe[5];
  always @(posedge clk) begin
    pred_pipe[0] <= iss_valid && iss_stage == STG_PRED;
    sad_pipe[0]  <= iss_valid && iss_stage == STG_SAD;
    res_pipe[0]  <= iss_valid && iss_stage == STG_RES;
    for (int i = 1; i < 8; i++) pred_pipe[i] <= pred_pipe[i-1];
    for (int i = 1; i < 7; i++) sad_pipe[i] <= sad_pipe[i-1];
    for (int i = 1; i < 6; i++) res_pipe[i] <= res_pipe[i-1];
    bank <= bank + (pred_pipe[6] ? 1 : 0) - (fifo_pop ? 1 : 0);
  end

  // issue monitor
  int unsigned run_start, n_pred, n_sad, n_sad_done, n_res;
  always @(negedge clk) if (rst_n) begin
    if (sad_done) n_sad_done++;
    if (iss_valid) begin
      case (iss_stage)
        STG_PRED: begin
          check(((cyc - run_start) % 2) == 0, "prediction on an even clock");
          check(iss_idx == 3'(n_pred), "prediction index order");
          check(!fifo_pop, "no pop with a prediction");
          n_pred++;
        end
        STG_SAD: begin
          check(((cyc - run_start) % 2) == 1, "SAD on an odd clock");
          check(!fifo_empty && fifo_pop, "SAD pops an available entry");
          n_sad++;
        end
        default: begin
          check(n_sad_done == NP, "residue after all SAD results");
          n_res++;
        end
      endcase
    end
  end

  initial begin
    int unsigned t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < 3; b++) begin
      n_pred = 0; n_sad = 0; n_sad_done = 0; n_res = 0;
      repeat (b) @(negedge clk);
      t0 = cyc;
      for (int r = 0; r < int'(N); r++) begin
        row_valid = 1;
        #1;
        check(row_ready && load_en && load_row == 2'(r), "row handshake and number");
        check(cmp_clear == (r == int'(N) - 1), "comparator clear on the last row");
        @(negedge clk);
      end
      row_valid = 0;
      run_start = cyc;
      check(busy && !row_ready, "busy after loading");
      while (!res_last) @(negedge clk);
      check(n_pred == NP && n_sad == NP && n_res == 1, "step counts");
      // rows in clocks 0..N-1; last SAD issued N + 2*(NP-1) + 9, its result 7 clocks
      // later, residue issued 7 clocks after that SAD, last column 6 after it;
      // the count includes both end clocks
      check(cyc - t0 + 1 == N + 2 * (NP - 1) + 9 + 7 + 7 + 1,
            $sformatf("block cycles %0d", cyc - t0 + 1));
      @(negedge clk);
      check(row_ready && !busy, "back to loading");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
