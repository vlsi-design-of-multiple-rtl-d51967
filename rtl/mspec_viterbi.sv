// mspec_viterbi: multiple-specification Viterbi decoder (top level).
//
// Decodes a rate-1/2 convolutional code with 4-bit soft decisions. The
// constraint length K (3..9) and the decoding depth D = m * K (m = 2, 3, 4) can
// be chosen at run time, 21 specifications in all, so a receiver can spend
// less effort when the channel is good. The depth can be changed at any time
// through decoding_depth; a new constraint length needs the reconfiguration
// handshake: raise reconfig_req with constraint_length (and decoding_depth)
// set, the decoder stops taking input (in_ready low), decodes everything it
// holds, switches, and pulses reconfig_ack.
//
// Datapath: bmc (codeword store, XOR, ADD) -> acs (grouped add-compare-select,
// minimum path, normalisation) -> systolic_array (systolic traceback with 16
// selectable output taps and the output shift register). control_block runs
// the specification and the handshake. The block split and the signal names
// follow the source design; widths, encodings and timing are this design's.
//
// Interface: one symbol pair (sym0 from the first generator, sym1 from the
// second) is taken per clock when in_valid and in_ready are high. Decoded bits
// come out in order on dec_bit with dec_valid. With steady input the output of
// step t appears 2D + 4 clocks after the clock that took step t's symbols.
// spec_k / spec_depth show the specification in use; depth_switching is high
// while a decoding-depth change is being absorbed. After reset the
// specification is K = 7, depth 4K = 28.
module mspec_viterbi
  import vd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  soft_t  sym0,
  input  soft_t  sym1,
  input  logic   reconfig_req,
  input  klen_t  constraint_length,
  input  dmul_t  decoding_depth,
  output logic   reconfig_ack,
  output logic   dec_bit,
  output logic   dec_valid,
  output klen_t  spec_k,
  output depth_t spec_depth,
  output logic   depth_switching
);

  logic    enable, reconfig_req_sig, decode_finish;
  klen_t   k;
  dmul_t   dmul;
  logic    bm_valid, acs_valid;
  bm_t     bm [NS][2];
  decvec_t dec;
  state_t  min_state;

  control_block u_control (
    .clk(clk), .rst_n(rst_n),
    .reconfig_req(reconfig_req), .k_in(constraint_length), .dmul_in(decoding_depth),
    .decode_finish(decode_finish),
    .enable(enable), .k(k), .dmul(dmul),
    .reconfig_req_sig(reconfig_req_sig), .reconfig_ack(reconfig_ack)
  );

  bmc u_bmc (
    .clk(clk), .rst_n(rst_n), .en(enable), .k(k),
    .in_valid(in_valid), .sym0(sym0), .sym1(sym1),
    .out_valid(bm_valid), .bm(bm)
  );

  acs u_acs (
    .clk(clk), .rst_n(rst_n), .k(k),
    .in_valid(bm_valid), .bm(bm),
    .out_valid(acs_valid), .dec(dec), .min_state(min_state)
  );

  systolic_array u_sa (
    .clk(clk), .rst_n(rst_n), .k(k), .dmul(dmul),
    .reconfig_req_sig(reconfig_req_sig),
    .in_enb(acs_valid), .dec_in(dec), .min_state_in(min_state),
    .decode_finish(decode_finish),
    .dec_bit(dec_bit), .dec_valid(dec_valid),
    .cur_depth(spec_depth), .in_window(depth_switching)
  );

  assign in_ready = enable;
  assign spec_k   = k;

endmodule
