// systolic_array: systolic traceback (survivor memory) of the decoder.
//
// MAX_DEPTH + 1 = 37 components are chained: component j holds, in its state
// register, the traceback state j steps behind the step at which the traceback
// started (component 0 holds the ACS block's best state itself). Every
// component whose depth j is one of the 16 supported decoding depths m * K
// (6, 8, 9, 10, 12, 14, 15, 16, 18, 20, 21, 24, 27, 28, 32, 36) is a type2
// component: its Load_out and Final_output go to the systolic array control
// (sa_ctrl), which picks the output, handles depth changes, clears unused
// components and reports when the array has emptied.
//
// Type2 placement at all 16 depths follows the source design's count of sixteen
// type2 components; the array length and the use of component 0 for the best
// state are this design's choices.
//
// Timing: a decision vector and its best state arrive together with in_enb (the
// ACS block's out_valid). The decoded bit of step t leaves on dec_bit, with
// dec_valid, 2D + 2 clocks after step t's vector arrived, D being the decoding
// depth (plus the extra delay that the output shift register may add after a
// depth change).
module systolic_array
  import vd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  klen_t   k,
  input  dmul_t   dmul,
  input  logic    reconfig_req_sig,
  input  logic    in_enb,
  input  decvec_t dec_in,
  input  state_t  min_state_in,
  output logic    decode_finish,
  output logic    dec_bit,
  output logic    dec_valid,
  output depth_t  cur_depth,
  output logic    in_window
);

  localparam int NC = MAX_DEPTH + 1;

  logic    enb   [NC+1];
  decvec_t dv    [NC+1];
  state_t  ms    [NC+1];
  logic    load  [NC];
  logic    fbit  [NC];
  logic    clr   [NC];

  assign enb[0] = in_enb;
  assign dv[0]  = dec_in;
  assign ms[0]  = min_state_in;

  for (genvar j = 0; j < NC; j++) begin : g_cell
    sa_cell u_cell (
      .clk(clk), .rst_n(rst_n), .clr(clr[j]), .k(k),
      .in_enb(enb[j]), .dec_in(dv[j]), .min_state_in(ms[j]),
      .out_enb(enb[j+1]), .dec_out(dv[j+1]), .min_state_out(ms[j+1]),
      .load_out(load[j]), .final_out(fbit[j])
    );
  end

  // Type2 outputs to the control block.
  logic tap_load [N_TAPS];
  logic tap_bit  [N_TAPS];
  for (genvar t = 0; t < N_TAPS; t++) begin : g_tap
    localparam int J = tap_depth(t);
    assign tap_load[t] = load[J];
    assign tap_bit[t]  = fbit[J];
  end

  logic any_valid;
  always_comb begin
    any_valid = in_enb;
    for (int j = 0; j < NC; j++)
      any_valid = any_valid | load[j] | enb[j+1];
  end

  sa_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .k(k), .dmul(dmul),
    .reconfig_req_sig(reconfig_req_sig), .any_valid(any_valid),
    .tap_load(tap_load), .tap_bit(tap_bit), .clr(clr),
    .decode_finish(decode_finish), .dec_bit(dec_bit), .dec_valid(dec_valid),
    .cur_depth(cur_depth), .in_window(in_window)
  );

endmodule
