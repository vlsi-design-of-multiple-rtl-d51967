// tb_mspec_viterbi: end-to-end test of the multiple-specification Viterbi
// decoder at its default parameters.
//
// A reference rate-1/2 encoder in the testbench (its own copy of the
// generator polynomials) encodes random data into 4-bit soft symbols with
// small soft noise and isolated hard symbol errors. The decoded stream must
// equal the data bit for bit, in order, with nothing lost or repeated, through:
//   - the first-output latency 2D + 4 at the reset specification (K = 7, D = 28),
//   - input bubbles (in_valid low),
//   - decoding-depth changes: shorter with an empty and with a filled output
//     shift register, longer served from the shift register, longer with a
//     Valid_out gap,
//   - reconfigurations of the constraint length through the handshake, each of
//     which must flush every entered bit before reconfig_ack,
//   - every constraint length 3..9.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_mspec_viterbi;
  import vd_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid = 1'b0;
  logic   in_ready;
  soft_t  sym0 = '0, sym1 = '0;
  logic   reconfig_req = 1'b0;
  klen_t  constraint_length = 4'd7;
  dmul_t  decoding_depth = 3'd4;
  logic   reconfig_ack, dec_bit, dec_valid, depth_switching;
  klen_t  spec_k;
  depth_t spec_depth;

  mspec_viterbi dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---- reference encoder ----
  function automatic logic [8:0] poly(int k, int i);
    logic [8:0] t [2][10];
    t[0][3] = 9'o7;   t[1][3] = 9'o5;
    t[0][4] = 9'o15;  t[1][4] = 9'o17;
    t[0][5] = 9'o23;  t[1][5] = 9'o35;
    t[0][6] = 9'o53;  t[1][6] = 9'o75;
    t[0][7] = 9'o171; t[1][7] = 9'o133;
    t[0][8] = 9'o247; t[1][8] = 9'o371;
    t[0][9] = 9'o561; t[1][9] = 9'o753;
    return t[i][k];
  endfunction

  int          enc_k = 7;
  logic [8:0]  hist = '0;          // hist[j] = input bit j steps ago
  logic        exp_bits [int];
  int          n_in = 0, n_out = 0;
  int          steps_in_phase = 0;
  int          last_err = -1000;

  // mechanism counters
  int c_bubble = 0, c_short_empty = 0, c_short_full = 0, c_long_sr = 0, c_long_gap = 0;
  int c_reconfig = 0, c_latency = 0, c_errors_fixed = 0;
  bit seen_k [10];

  function automatic soft_t soft_of(logic c, bit hard);
    int nz;
    nz = $urandom_range(0, 5);
    if (hard) return c ? soft_t'(0) : soft_t'(15);
    return c ? soft_t'(15 - nz) : soft_t'(nz);
  endfunction

  // Present one step (bit u) until it is taken; bubbles may precede it.
  task automatic send_bit(logic u, bit allow_err, int bubble_pct);
    logic [8:0] h;
    logic [1:0] c;
    bit         hard;
    while (bubble_pct > 0 && $urandom_range(0, 99) < bubble_pct) begin
      in_valid = 1'b0;
      @(posedge clk); #1;
      c_bubble++;
    end
    h = {hist[7:0], u};
    c = '0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < enc_k; j++)
        c[i] = c[i] ^ (poly(enc_k, i)[enc_k-1-j] & h[j]);
    hard = allow_err && (n_in - last_err > 40) && $urandom_range(0, 9) == 0;
    if (hard) begin
      last_err = n_in;
      c_errors_fixed++;
    end
    sym0 = soft_of(c[0], hard);
    sym1 = soft_of(c[1], 1'b0);
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1;
    in_valid = 1'b0;
    hist = h;
    exp_bits[n_in] = u;
    n_in++;
  endtask

  // n random bits; no hard errors in the last 60 so every flush is clean.
  task automatic send_random(int n, int bubble_pct);
    for (int i = 0; i < n; i++) send_bit(1'($urandom), i < n - 60, bubble_pct);
  endtask

  // ---- output monitor ----
  always @(posedge clk) begin
    if (rst_n && dec_valid) begin
      checks++;
      if (!exp_bits.exists(n_out) || exp_bits[n_out] != dec_bit) begin
        failures++;
        if (failures < 10) $display("mismatch at bit %0d (cycle %0d)", n_out, cycle);
      end
      n_out++;
    end
  end

  // ---- mechanism monitor (through the control's state) ----
  int last_depth = 28;
  logic sw_q = 1'b0;
  always @(posedge clk) begin
    sw_q <= depth_switching;
    if (depth_switching && !sw_q) begin
      if (dut.u_sa.u_ctrl.mode == 2'd1) begin
        if (int'(dut.u_sa.u_ctrl.win) == 2 * (last_depth - int'(spec_depth))) c_short_empty++;
        else c_short_full++;
      end
    end
    if (depth_switching && dut.u_sa.u_ctrl.mode == 2'd2) begin
      if (dut.u_sa.u_ctrl.n != 0) c_long_sr++;
      else if (!dut.u_sa.u_ctrl.o_val) c_long_gap++;
    end
  end

  task automatic change_depth(int m);
    last_depth = int'(spec_depth);
    decoding_depth = dmul_t'(m);
  endtask

  task automatic reconfigure(int k, int m);
    int t0;
    // terminate the trellis with K-1 zeros so the flushed tail is exact
    for (int i = 0; i < enc_k - 1; i++) send_bit(1'b0, 1'b0, 0);
    constraint_length = klen_t'(k);
    decoding_depth = dmul_t'(m);
    reconfig_req = 1'b1;
    t0 = cycle;
    while (!reconfig_ack && cycle - t0 < 2000) begin
      @(posedge clk); #1;
    end
    reconfig_req = 1'b0;
    checks++;
    if (!reconfig_ack) begin
      failures++;
      $display("no reconfig_ack");
    end
    // every entered bit must be out by the acknowledge
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("flush incomplete: in %0d out %0d", n_in, n_out);
    end
    @(posedge clk); #1;
    checks++;
    if (int'(spec_k) != k || int'(spec_depth) != m * k) begin
      failures++;
      $display("spec after reconfig: K=%0d D=%0d", spec_k, spec_depth);
    end else c_reconfig++;
    enc_k = k;
    hist = '0;
    seen_k[k] = 1'b1;
    last_depth = m * k;
  endtask

  task automatic wait_depth_settled();
    @(posedge clk); #1;
    while (depth_switching) begin
      send_bit(1'($urandom), 1'b0, 0);
    end
  endtask

  initial begin
    int t_acc;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // Phase A: reset specification K = 7, D = 28; first-output latency.
    seen_k[7] = 1'b1;
    checks++;
    if (spec_k != 4'd7 || spec_depth != 6'd28) begin
      failures++;
      $display("reset spec K=%0d D=%0d", spec_k, spec_depth);
    end
    sym0 = soft_of(1'b0, 1'b0);
    sym1 = soft_of(1'b0, 1'b0);
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    t_acc = cycle;
    #1 in_valid = 1'b0;
    hist = '0;
    exp_bits[n_in] = 1'b0;
    n_in++;
    fork
      begin
        while (!dec_valid) @(posedge clk);
        checks++;
        if (cycle - t_acc != 2 * 28 + 4) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - t_acc, 2 * 28 + 4);
        end else c_latency++;
      end
      send_random(200, 0);
    join
    send_random(200, 20);

    // Depth changes at K = 7: 28 -> 14 (shorter, empty register),
    // 14 -> 21 (longer, served from the register), 21 -> 14 (shorter, filled
    // register), 14 -> 28 (longer).
    change_depth(2); wait_depth_settled(); send_random(100, 0);
    change_depth(3); wait_depth_settled(); send_random(100, 10);
    change_depth(2); wait_depth_settled(); send_random(100, 0);
    change_depth(4); wait_depth_settled(); send_random(150, 0);

    // New constraint length K = 5, D = 10, then 10 -> 15 (longer, gap).
    reconfigure(5, 2);
    send_random(150, 0);
    change_depth(3); wait_depth_settled(); send_random(100, 0);
    change_depth(4); wait_depth_settled(); send_random(100, 0);
    change_depth(2); wait_depth_settled(); send_random(100, 0);
    change_depth(3); wait_depth_settled(); send_random(100, 0);

    // Remaining constraint lengths.
    reconfigure(9, 4); send_random(250, 10);
    change_depth(2); wait_depth_settled(); send_random(150, 0);
    reconfigure(3, 2); send_random(200, 0);
    change_depth(4); wait_depth_settled(); send_random(100, 0);
    reconfigure(4, 3); send_random(200, 0);
    reconfigure(6, 4); send_random(200, 0);
    reconfigure(8, 3); send_random(200, 0);
    reconfigure(7, 4);   // final flush

    // ---- mechanism coverage ----
    for (int k = K_MIN; k <= K_MAX; k++) begin
      checks++;
      if (!seen_k[k]) begin failures++; $display("K=%0d never used", k); end
    end
    checks++; if (c_bubble == 0)      begin failures++; $display("no input bubble"); end
    checks++; if (c_short_empty == 0) begin failures++; $display("no shorter change with empty register"); end
    checks++; if (c_short_full == 0)  begin failures++; $display("no shorter change with filled register"); end
    checks++; if (c_long_sr == 0)     begin failures++; $display("no longer change served from register"); end
    checks++; if (c_long_gap == 0)    begin failures++; $display("no longer change with Valid_out gap"); end
    checks++; if (c_reconfig < 6)     begin failures++; $display("only %0d reconfigurations", c_reconfig); end
    checks++; if (c_errors_fixed == 0) begin failures++; $display("no channel error injected"); end
    checks++; if (n_out != n_in)      begin failures++; $display("in %0d out %0d", n_in, n_out); end
    $display("bits=%0d bubbles=%0d short_empty=%0d short_full=%0d long_sr=%0d long_gap_cycles=%0d reconfig=%0d hard_errors=%0d",
             n_in, c_bubble, c_short_empty, c_short_full, c_long_sr, c_long_gap, c_reconfig, c_errors_fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
