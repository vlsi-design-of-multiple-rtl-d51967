// bmc: branch metric calculation block.
//
// Each accepted input step carries two soft symbols (4 bits each, 0 = confident
// '0', 15 = confident '1'). For every trellis branch the expected codeword from
// the codeword store is XORed bit by bit onto the symbols (a '1' code bit turns
// r into 15 - r, the distance from a confident '1') and the two distances are
// added: bm = (r0 ^ {4{c0}}) + (r1 ^ {4{c1}}), 0..30, smaller is better. This
// LUT -> mux -> XOR -> ADD path follows the source design; the symbol coding is
// this design's choice.
//
// Timing: a symbol pair is taken when in_valid and en are both high; its
// branch metrics appear on bm with out_valid one clock later. en is the
// controller's Enable: while it is low no input is taken.
module bmc
  import vd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  klen_t k,
  input  logic  in_valid,
  input  soft_t sym0,
  input  soft_t sym1,
  output logic  out_valid,
  output bm_t   bm [NS][2]
);

  logic [1:0] cw [NS][2];

  // Distance of a soft symbol from code bit c: XOR with c replicated.
  function automatic bm_t sym_dist(soft_t r, logic c);
    soft_t x;
    x = r ^ {SOFT_W{c}};
    return bm_t'(x);
  endfunction

  codeword_store u_store (.k(k), .cw(cw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int s = 0; s < NS; s++) begin
        bm[s][0] <= '0;
        bm[s][1] <= '0;
      end
    end else begin
      out_valid <= in_valid && en;
      if (in_valid && en) begin
        for (int s = 0; s < NS; s++)
          for (int b = 0; b < 2; b++)
            bm[s][b] <= sym_dist(sym0, cw[s][b][0]) + sym_dist(sym1, cw[s][b][1]);
      end
    end
  end

endmodule
