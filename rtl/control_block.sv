// control_block: specification controller of the decoder.
//
// It holds the current specification (constraint length K and decoding depth
// multiplier m, depth = m * K) and runs the reconfiguration handshake:
//   RUN    Enable = 1. A new multiplier on dmul_in is taken at any time (the
//          systolic array control absorbs the depth change). A rising edge of
//          reconfig_req starts a reconfiguration; k_in and dmul_in are sampled.
//   DRAIN  Enable = 0 (the branch metric block takes no input) and
//          reconfig_req_sig = 1 to the systolic array. After DRAIN_WAIT clocks,
//          long enough for steps already inside the BMC and ACS registers to
//          reach the array, it waits for decode_finish.
//   APPLY  the sampled specification becomes current (reconfig_req_sig stays
//          high for this clock so the array adopts it with an empty output
//          register; the ACS restarts its metrics because K changed).
//   ACK    reconfig_ack is high for one clock; back to RUN.
// Out-of-range requests (K outside 3..9, m outside 2..4) keep the old value.
// The signal set and the sequence follow the source design; the state
// encoding, the edge-triggered request, the one-clock acknowledge and the
// reset specification (K = 7, m = 4) are this design's choices.
module control_block
  import vd_pkg::*;
#(
  parameter int DRAIN_WAIT = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  reconfig_req,
  input  klen_t k_in,
  input  dmul_t dmul_in,
  input  logic  decode_finish,
  output logic  enable,
  output klen_t k,
  output dmul_t dmul,
  output logic  reconfig_req_sig,
  output logic  reconfig_ack
);

  typedef enum logic [1:0] {S_RUN, S_DRAIN, S_APPLY, S_ACK} cstate_t;

  cstate_t state;
  logic    req_q;
  klen_t   k_new;
  dmul_t   dmul_new;
  logic [$clog2(DRAIN_WAIT + 1):0] cnt;

  function automatic bit k_ok(klen_t v);
    return int'(v) >= K_MIN && int'(v) <= K_MAX;
  endfunction
  function automatic bit m_ok(dmul_t v);
    return int'(v) >= M_MIN && int'(v) <= M_MAX;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_RUN;
      req_q    <= 1'b0;
      k        <= klen_t'(K_RESET);
      dmul     <= dmul_t'(M_RESET);
      k_new    <= klen_t'(K_RESET);
      dmul_new <= dmul_t'(M_RESET);
      cnt      <= '0;
    end else begin
      req_q <= reconfig_req;
      case (state)
        S_RUN: begin
          if (reconfig_req && !req_q) begin
            k_new    <= k_ok(k_in) ? k_in : k;
            dmul_new <= m_ok(dmul_in) ? dmul_in : dmul;
            cnt      <= ($bits(cnt))'(DRAIN_WAIT);
            state    <= S_DRAIN;
          end else if (m_ok(dmul_in)) begin
            dmul <= dmul_in;
          end
        end
        S_DRAIN: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else if (decode_finish) begin
            k     <= k_new;
            dmul  <= dmul_new;
            state <= S_APPLY;
          end
        end
        S_APPLY: state <= S_ACK;
        default: state <= S_RUN;
      endcase
    end
  end

  assign enable           = state == S_RUN || state == S_ACK;
  assign reconfig_req_sig = state == S_DRAIN || state == S_APPLY;
  assign reconfig_ack     = state == S_ACK;

  // The controller never sets an unsupported specification.
  a_spec_ok: assert property (@(posedge clk) disable iff (!rst_n) k_ok(k) && m_ok(dmul));

endmodule
