// codeword_store: the "codeword store" LUT of the branch metric block.
//
// For every trellis branch (destination state s, predecessor oldest bit b) it
// holds the expected 2-bit codeword, one table per constraint length K = 3..9,
// and a multiplexer driven by the constraint length picks the table in use.
// Branches into states that do not exist at the selected K (s >= 2^(K-1)) read
// 2'b00, so the unused part of the datapath sees constant inputs.
//
// The tables are constants computed at elaboration from the generator
// polynomials in vd_pkg; the LUT-plus-multiplexer structure follows the source
// design, the polynomials are this design's choice. Purely combinational.
//
// Ports: k (constraint length), cw[s][b] = {c1, c0}.
module codeword_store
  import vd_pkg::*;
(
  input  klen_t      k,
  output logic [1:0] cw [NS][2]
);

  for (genvar s = 0; s < NS; s++) begin : g_s
    for (genvar b = 0; b < 2; b++) begin : g_b
      logic [1:0] table_k [N_K];
      for (genvar kk = 0; kk < N_K; kk++) begin : g_k
        localparam logic [1:0] CW = codeword(kk + K_MIN, s, b[0]);
        assign table_k[kk] = CW;
      end
      always_comb begin
        cw[s][b] = 2'b00;
        if (k >= klen_t'(K_MIN) && k <= klen_t'(K_MAX) && s < (1 << (int'(k) - 1)))
          cw[s][b] = table_k[3'(k - klen_t'(K_MIN))];
      end
    end
  end

endmodule
