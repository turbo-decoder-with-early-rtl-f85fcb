// Threshold comparison unit.
//
// Decides, for one extrinsic LLR leaving a MAP decoder in the backward
// recursion, the new status bit and whether the value is written back.
// If the stored status bit is already set nothing is written and the status
// stays 1. Otherwise |Le| is compared with the threshold, the result
// becomes the new status bit and the value is written. Combinational.
// Interface: status_in and le in, status_out, we and le_out (the value to
// store, passed through unchanged so the unit's outputs form the complete
// memory word) out; thr is the non-negative threshold.
// Follows the document: the decision rule and the write suppression. Own
// choice: the comparison is strict (|Le| > thr); the magnitude is unsigned,
// so -64 counts as 64.
module tcu
  import tdec_pkg::*;
(
  input  logic status_in,
  input  llr_t le,
  input  llr_t thr,          // non-negative threshold
  output logic status_out,
  output llr_t le_out,
  output logic we
);
  logic [LE_W-1:0] mag;     // |Le|, -2^(LE_W-1) maps to 2^(LE_W-1)

  always_comb begin
    mag        = le[LE_W-1] ? LE_W'(-le) : LE_W'(le);
    status_out = status_in ? 1'b1 : (mag > LE_W'(thr));
    le_out     = le;
    we         = ~status_in;
  end
endmodule
