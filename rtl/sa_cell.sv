// sa_cell: one component of the systolic traceback array (type1 and type2).
//
// Decision vectors (one survivor bit per state) move through two registers per
// component, together with their enable bit (In_enb -> Out_enb). The traceback
// state moves through one register per component (Min_stat reg). Because the
// state travels twice as fast as the decision vectors, the state held in
// component j meets the decision vector produced j trellis steps before the
// step at which its traceback started. The Min_stat Calcul stage reads the
// survivor bit of that state from the vector in the first register and steps
// back to the predecessor: (s >> 1) | (dec[s] << (K-2)). When that vector is
// not valid (the enable bit is 0) the state passes unchanged, so a traceback
// started after the input stream stopped simply waits until it reaches real
// data; this is how the array empties itself before a reconfiguration.
//
// Type2 components additionally report Load_out (a valid vector sits in the
// first register) and Final_output (bit 0 of the held state, the input bit of
// that trellis step, i.e. the decoded bit). One module serves both types; in a
// type1 position the array leaves those two outputs open.
//
// The two-register / one-register structure and the port set follow the source
// design. The skip-on-invalid rule, the bit that forms Final_output and the
// synchronous per-component clear (clr) are this design's choices.
//
// Timing: a vector entering at clock t leaves on dec_out at t+2; a state entering
// at t leaves (stepped back) on min_state_out at t+1, combinationally from the
// held state.
module sa_cell
  import vd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  klen_t   k,
  input  logic    in_enb,
  input  decvec_t dec_in,
  input  state_t  min_state_in,
  output logic    out_enb,
  output decvec_t dec_out,
  output state_t  min_state_out,
  output logic    load_out,
  output logic    final_out
);

  logic    v1, v2;
  decvec_t d1, d2;
  state_t  st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0;
      d1 <= '0;   d2 <= '0;
      st <= '0;
    end else if (clr) begin
      v1 <= 1'b0; v2 <= 1'b0;
      d1 <= '0;   d2 <= '0;
      st <= '0;
    end else begin
      v1 <= in_enb;
      if (in_enb) d1 <= dec_in;
      v2 <= v1;
      if (v1) d2 <= d1;
      st <= min_state_in;
    end
  end

  // Min_stat Calcul: step back one trellis step.
  always_comb begin
    state_t mask;
    mask = state_t'((1 << (int'(k) - 1)) - 1);
    if (v1)
      min_state_out = ((st >> 1) | (state_t'(d1[st]) << (int'(k) - 2))) & mask;
    else
      min_state_out = st;
  end

  assign out_enb   = v2;
  assign dec_out   = d2;
  assign load_out  = v1;
  assign final_out = st[0];

endmodule
