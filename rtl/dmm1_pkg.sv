// dmm1_pkg: types and constants shared by the DMM-1 wedgelet encoder.
//
// The D-Core step is selected by a two-bit STAGE code whose bits carry meaning
// on their own: bit 1 low means the prediction step (region sums), bit 1 high
// with bit 0 low means the SAD step, and bit 0 high means the residue stage.
// Depth samples are 8-bit; residues are 9-bit two's complement.
package dmm1_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned RES_W = PIX_W + 1;

  typedef enum logic [1:0] {
    STG_PRED = 2'b00,   // prediction step: accumulate region sums
    STG_RES  = 2'b01,   // residue stage: pixel minus predicted sample
    STG_SAD  = 2'b10    // SAD step: accumulate |pixel - region average|
  } stage_e;

  // Width of a region sum or SAD over an n x n block of 8-bit samples.
  function automatic int unsigned sum_width(input int unsigned n);
    return $clog2(n * n * ((1 << PIX_W) - 1) + 1);
  endfunction

  // Width of a sample count 0 .. n*n.
  function automatic int unsigned cnt_width(input int unsigned n);
    return $clog2(n * n + 1);
  endfunction

endpackage
