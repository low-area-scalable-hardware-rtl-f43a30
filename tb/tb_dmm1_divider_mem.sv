// tb_dmm1_divider_mem: for every count k = 1..1024 of a 32x32 block, checks
// on both read ports that multiplying by the stored reciprocal and shifting
// gives floor(x / k) for the largest dividend, for dividends just below and at
// multiples of k, and for random dividends; count 0 must read 0.
module tb_dmm1_divider_mem;
  localparam int unsigned MAXCNT = 1024;
  localparam int unsigned XW = 19;
  localparam int unsigned CW = 11;
  localparam int unsigned SH = XW + CW;

  logic [CW-1:0] cnt0 = 0, cnt1 = 0;
  logic [SH:0] recip0, recip1;

  dmm1_divider_mem #(.MAXCNT(MAXCNT), .XW(XW)) dut (.*);

  int unsigned checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(input longint unsigned x, input longint unsigned k, input logic [SH:0] m);
    return ((x * longint'(m)) >> SH) == x / k;
  endfunction

  initial begin
    #1;
    checks++; if (recip0 != 0) failures++;
    for (int unsigned k = 1; k <= MAXCNT; k++) begin
      longint unsigned xs [5];
      cnt0 = CW'(k); cnt1 = CW'(MAXCNT + 1 - k);
      #1;
      xs[0] = (1 << XW) - 1;
      xs[1] = ((xs[0] / k) * k) - 1;
      xs[2] = (xs[0] / k) * k;
      xs[3] = longint'($urandom) % (1 << XW);
      xs[4] = k - 1;
      foreach (xs[i]) begin
        checks++; if (!ok(xs[i], k, recip0)) failures++;
        checks++; if (!ok(xs[i], MAXCNT + 1 - k, recip1)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
