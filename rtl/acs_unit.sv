// acs_unit: add-compare-select for one trellis state (the "path metric" and
// "survivor path" boxes of the ACS block).
//
// The two candidate path metrics are pm0 + bm0 (from the predecessor whose
// oldest bit is 0) and pm1 + bm1 (oldest bit 1). The smaller one becomes the
// new path metric; dec records which predecessor survived (1 = the oldest-bit-1
// predecessor). A tie keeps predecessor 0, a choice of this design. Purely
// combinational; the caller keeps the operands small enough not to overflow
// (path metrics are normalised every step).
module acs_unit
  import vd_pkg::*;
(
  input  pm_t  pm0,
  input  pm_t  pm1,
  input  bm_t  bm0,
  input  bm_t  bm1,
  output pm_t  pm_new,
  output logic dec
);

  pm_t cand0, cand1;

  always_comb begin
    cand0  = pm0 + pm_t'(bm0);
    cand1  = pm1 + pm_t'(bm1);
    dec    = cand1 < cand0;
    pm_new = dec ? cand1 : cand0;
  end

endmodule
