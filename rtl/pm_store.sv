// pm_store: normalization and state metric store of the ACS block.
//
// On every valid trellis step the new path metrics of the active states are
// stored with the step's minimum subtracted, so the smallest stored metric is
// always 0 and the metrics stay within a fixed width. Metrics of states that do
// not exist at the current constraint length are held at 0. When the constraint
// length changes the store restarts: state 0 (where the encoder starts) gets 0
// and every other active state PM_INIT. Normalising in the same step and the
// restart values are this design's choices; the source design only names the
// block.
//
// Timing: pm reflects the step presented with in_valid one clock later.
module pm_store
  import vd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  klen_t k,
  input  logic  in_valid,
  input  pm_t   pm_new [NS],
  input  pm_t   pm_min,
  output pm_t   pm [NS]
);

  klen_t k_q;

  function automatic bit active(int s, klen_t kk);
    return s < (1 << (int'(kk) - 1));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q <= '0;
      for (int s = 0; s < NS; s++) pm[s] <= '0;
    end else begin
      k_q <= k;
      if (k != k_q) begin
        for (int s = 0; s < NS; s++)
          pm[s] <= (s == 0 || !active(s, k)) ? pm_t'(0) : pm_t'(PM_INIT);
      end else if (in_valid) begin
        for (int s = 0; s < NS; s++)
          pm[s] <= active(s, k) ? pm_new[s] - pm_min : pm_t'(0);
      end
    end
  end

endmodule
