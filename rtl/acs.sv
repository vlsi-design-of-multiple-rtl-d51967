// acs: add-compare-select block of the multiple-specification Viterbi decoder.
//
// The 256 states of the largest code (K = 9) are split into seven groups that
// follow the constraint lengths: group 0 holds states 0..3 (all K), group g >= 1
// holds states 2^(g+1) .. 2^(g+2)-1, which exist only for K >= g + 3. Each group
// has its own path metric / survivor units (acs_unit) and its own minimum path
// unit (min_path). The input control stage feeds the units of unused groups
// constant zeros, so they do not toggle. A final min_path picks the best state
// among the active groups, and pm_store normalises and stores the metrics.
// The grouping by constraint length and the constant inputs of unused groups
// follow the source design; the exact group boundaries are this design's.
//
// Predecessors of state s at constraint length K: p_b = (s >> 1) | (b << (K-2)).
//
// Timing: one trellis step per clock. The decision vector (bit s = survivor of
// state s) and the best state of a step appear with out_valid one clock after
// in_valid. Between steps dec and min_state hold their last values, which is
// what the traceback array reads while it flushes.
module acs
  import vd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  klen_t   k,
  input  logic    in_valid,
  input  bm_t     bm [NS][2],
  output logic    out_valid,
  output decvec_t dec,
  output state_t  min_state
);

  localparam int NG = N_K + 1;   // groups padded to a power of two for the final tree

  // First state and size of group g.
  function automatic int g_base(int g);
    return (g == 0) ? 0 : (1 << (g + 1));
  endfunction
  function automatic int g_size(int g);
    return (g == 0) ? 4 : (1 << (g + 1));
  endfunction

  pm_t     pm     [NS];
  pm_t     pm_new [NS];
  decvec_t dec_c;
  logic    grp_act [N_K];

  // ---- input control: group enables and gated operands ----
  always_comb
    for (int g = 0; g < N_K; g++)
      grp_act[g] = int'(k) >= g + K_MIN;

  for (genvar s = 0; s < NS; s++) begin : g_st
    localparam int G = (s < 4) ? 0 : $clog2(s + 1) - 2;
    pm_t  a0, a1;
    bm_t  b0, b1;
    logic d;
    always_comb begin
      logic [SW-1:0] p0, p1;
      p0 = SW'(s >> 1);
      p1 = p0 | (SW'(1) << (int'(k) - 2));
      if (grp_act[G]) begin
        a0 = pm[p0];
        a1 = pm[p1];
        b0 = bm[s][0];
        b1 = bm[s][1];
      end else begin
        a0 = '0;
        a1 = '0;
        b0 = '0;
        b1 = '0;
      end
    end
    acs_unit u_acs (.pm0(a0), .pm1(a1), .bm0(b0), .bm1(b1), .pm_new(pm_new[s]), .dec(d));
    assign dec_c[s] = d & grp_act[G];
  end

  // ---- per-group minimum path, then across the active groups ----
  pm_t    grp_min [NG];
  state_t grp_arg [NG];

  for (genvar g = 0; g < N_K; g++) begin : g_grp
    localparam int B = g_base(g);
    localparam int N = g_size(g);
    pm_t                 v [N];
    pm_t                 mv;
    logic [$clog2(N)-1:0] mi;
    for (genvar i = 0; i < N; i++) begin : g_in
      assign v[i] = pm_new[B + i];
    end
    min_path #(.N(N), .W(PM_W)) u_min (.val(v), .min_val(mv), .min_idx(mi));
    assign grp_min[g] = grp_act[g] ? mv : '1;
    assign grp_arg[g] = state_t'(B) + state_t'(mi);
  end
  assign grp_min[NG-1] = '1;
  assign grp_arg[NG-1] = '0;

  pm_t                   best_pm;
  logic [$clog2(NG)-1:0] best_g;
  min_path #(.N(NG), .W(PM_W)) u_min_all (.val(grp_min), .min_val(best_pm), .min_idx(best_g));

  // ---- normalisation and state metric store ----
  pm_store u_store (
    .clk(clk), .rst_n(rst_n), .k(k), .in_valid(in_valid),
    .pm_new(pm_new), .pm_min(best_pm), .pm(pm)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dec       <= '0;
      min_state <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dec       <= dec_c;
        min_state <= grp_arg[best_g];
      end
    end
  end

endmodule
