// sa_ctrl: control block of the systolic traceback array.
//
// It picks the decoder output among the Final_output bits of the 16 type2
// components, clears the components that the current constraint length never
// uses, hides decoding-depth changes behind an output shift register, and tells
// the reconfiguration controller when every entered step has been decoded.
//
// Slots. Component j shows, at clock c, the decoded bit of the trellis step
// that entered the array at clock c-1-2j. Moving the output tap by Δ components
// therefore moves the output stream by 2Δ steps. The controller treats the
// stream as a sequence of slots (one per clock, with its Load_out bit as the
// slot's valid flag) and keeps it gap-free and duplicate-free across depth
// changes with a shift register Q of n slots (MSB = oldest = next out):
//   steady    n = 0: output the tap of the current depth D directly;
//             n > 0: output Q's MSB and shift the tap of D into Q.
//   shorter   (D -> D - Δ): for n + 2Δ clocks the output comes live from the
//             component at depth E = D + n/2 (which shows exactly the slots that
//             Q held and the 2Δ slots the new tap skips), while the new tap
//             fills an emptied Q. Afterwards Q holds n + 2Δ slots.
//   longer    (D -> D + Δ): for 2Δ clocks the new tap repeats slots already
//             delivered and is ignored; Q's MSB is output while Q is not empty,
//             and Valid_out is 0 once it is.
// The shorter/longer behaviour (store in the shift register, drive out its MSB,
// or drive Valid_out low when it is empty) follows the source design; the window
// lengths of 2Δ (not Δ) clocks follow from the two-register component, and
// serving the shorter case from the deeper component is this design's choice.
// A new depth is taken only when no window is running.
//
// Reconfiguration: while reconfig_req_sig is high the controller raises
// decode_finish once the array, its input and Q hold no valid step, and then
// takes the new depth and constraint length as they are, with Q emptied.
//
// Components deeper than 4K (the longest depth at the current K) are held in
// clear (clr), so they do not switch; the shallower ones always run, so every
// depth of the current K is ready at any time.
//
// Timing: dec_bit / dec_valid are registered, one clock after the tap.
module sa_ctrl
  import vd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  klen_t k,
  input  dmul_t dmul,
  input  logic  reconfig_req_sig,
  input  logic  any_valid,                 // a valid vector anywhere in the array or at its input
  input  logic  tap_load  [N_TAPS],        // Load_out of the type2 components
  input  logic  tap_bit   [N_TAPS],        // Final_output of the type2 components
  output logic  clr       [MAX_DEPTH+1],   // per-component clear
  output logic  decode_finish,
  output logic  dec_bit,
  output logic  dec_valid,
  output depth_t cur_depth,                // depth currently feeding the output
  output logic  in_window                  // a depth-change window is running
);

  typedef enum logic [1:0] {ST_STEADY, ST_SHORTER, ST_LONGER} mode_t;

  localparam int CW = $clog2(QDEPTH + 1) + 1;

  // Depth of each type2 component, fixed at elaboration.
  depth_t tapd [N_TAPS];
  for (genvar t = 0; t < N_TAPS; t++) begin : g_tapd
    localparam int TD = tap_depth(t);
    assign tapd[t] = depth_t'(TD);
  end

  localparam logic [3:0] RESET_TAP = tap_index(M_RESET * K_RESET);

  mode_t          mode;
  logic [3:0]     cur_tap, eff_tap;
  logic [CW-1:0]  n, win;
  logic           qb [QDEPTH];
  logic           qv [QDEPTH];

  // ---- requested depth ----
  depth_t     tgt_d;
  logic [3:0] tgt_tap;
  logic       tgt_ok;
  always_comb begin
    tgt_d   = depth_t'(int'(dmul) * int'(k));
    tgt_ok  = 1'b0;
    tgt_tap = cur_tap;
    if (int'(dmul) >= M_MIN && int'(dmul) <= M_MAX && int'(k) >= K_MIN && int'(k) <= K_MAX)
      for (int t = 0; t < N_TAPS; t++)
        if (tgt_d == tapd[t]) begin
          tgt_ok  = 1'b1;
          tgt_tap = 4'(t);
        end
  end

  depth_t d_cur;
  assign d_cur     = tapd[cur_tap];
  assign cur_depth = d_cur;
  assign in_window = mode != ST_STEADY;

  // ---- emptiness ----
  logic q_valid;
  always_comb begin
    q_valid = 1'b0;
    for (int i = 0; i < QDEPTH; i++)
      if (i < int'(n) && qv[i]) q_valid = 1'b1;
  end
  assign decode_finish = reconfig_req_sig && !any_valid && !q_valid && mode == ST_STEADY;

  always_comb
    for (int j = 0; j <= MAX_DEPTH; j++)
      clr[j] = j > 4 * int'(k);

  // ---- slot selection for this clock ----
  logic o_bit, o_val, push, pop;
  logic [3:0] push_tap;
  always_comb begin
    o_bit    = 1'b0;
    o_val    = 1'b0;
    push     = 1'b0;
    pop      = 1'b0;
    push_tap = cur_tap;
    case (mode)
      ST_SHORTER: begin
        o_bit = tap_bit[eff_tap];
        o_val = tap_load[eff_tap];
        push  = 1'b1;
      end
      ST_LONGER: begin
        if (n != 0) begin
          o_bit = qb[n-1];
          o_val = qv[n-1];
          pop   = 1'b1;
        end
      end
      default: begin
        if (n == 0) begin
          o_bit = tap_bit[cur_tap];
          o_val = tap_load[cur_tap];
        end else begin
          o_bit = qb[n-1];
          o_val = qv[n-1];
          pop   = 1'b1;
          push  = 1'b1;
        end
      end
    endcase
  end

  // ---- state ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= ST_STEADY;
      cur_tap   <= RESET_TAP;
      eff_tap   <= RESET_TAP;
      n         <= '0;
      win       <= '0;
      dec_bit   <= 1'b0;
      dec_valid <= 1'b0;
      for (int i = 0; i < QDEPTH; i++) begin
        qb[i] <= 1'b0;
        qv[i] <= 1'b0;
      end
    end else begin
      dec_bit   <= o_bit;
      dec_valid <= o_val;

      if (push) begin
        for (int i = QDEPTH - 1; i > 0; i--) begin
          qb[i] <= qb[i-1];
          qv[i] <= qv[i-1];
        end
        qb[0] <= tap_bit[push_tap];
        qv[0] <= tap_load[push_tap];
      end
      if (push && !pop) n <= n + 1'b1;
      else if (pop && !push) n <= n - 1'b1;

      case (mode)
        ST_STEADY: begin
          if (reconfig_req_sig && decode_finish) begin
            // Drained: adopt the (possibly new) specification with Q empty.
            n <= '0;
            if (tgt_ok) begin
              cur_tap <= tgt_tap;
              eff_tap <= tgt_tap;
            end
          end else if (tgt_ok && tgt_tap != cur_tap) begin
            depth_t     dd;
            logic [CW-1:0] w2;
            cur_tap <= tgt_tap;
            if (tgt_d < d_cur) begin
              dd   = d_cur - tgt_d;
              w2   = CW'(2 * int'(dd));
              win  <= n + w2;             // n after this clock's steady step is n
              n    <= '0;
              mode <= ST_SHORTER;
            end else begin
              dd   = tgt_d - d_cur;
              w2   = CW'(2 * int'(dd));
              win  <= w2;
              if (w2 >= n) eff_tap <= tgt_tap;
              mode <= ST_LONGER;
            end
          end
        end
        default: begin
          win <= win - 1'b1;
          if (win == CW'(1)) mode <= ST_STEADY;
        end
      endcase
    end
  end

  // The shift register never overflows: n <= 2 (E - D) <= 2 (MAX_DEPTH - MIN_DEPTH).
  a_q_bound: assert property (@(posedge clk) disable iff (!rst_n) int'(n) <= QDEPTH);

endmodule
