// tb_table2_specs: the decoder on a noisy channel, one run per specification
// of the dynamic-switching experiments: (K, depth multiplier) = (7,4), (7,3),
// (6,4), (6,3), (5,4), (5,3), (4,4), (4,3), (8,4), switched in that order by
// the reconfiguration handshake. Random bits are encoded, sent as +/-1 with
// Gaussian noise (Box-Muller) at Eb/N0 = EBN0_DB for the rate-1/2 code, and
// quantised to 4-bit soft symbols (level = 7.5 + 3.75 * y, clipped to 0..15).
// Per run it reports the raw hard-decision error rate of the channel and the
// decoded bit error rate, and checks that every bit came back and that
// decoding removes at least 80% of the channel's hard-decision errors.
// It measures short runs only; it does not reproduce error rates near 1e-5.
module tb_table2_specs;
  import vd_pkg::*;

  localparam int    N_BITS  = 10000;
  localparam real   EBN0_DB = 3.0;

  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready;
  soft_t  sym0 = '0, sym1 = '0;
  logic   reconfig_req = 1'b0;
  klen_t  constraint_length = 4'd7;
  dmul_t  decoding_depth = 3'd4;
  logic   reconfig_ack, dec_bit, dec_valid, depth_switching;
  klen_t  spec_k;
  depth_t spec_depth;

  mspec_viterbi dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [8:0] poly(int k, int i);
    case (k)
      3: return i ? 9'o5   : 9'o7;
      4: return i ? 9'o17  : 9'o15;
      5: return i ? 9'o35  : 9'o23;
      6: return i ? 9'o75  : 9'o53;
      7: return i ? 9'o133 : 9'o171;
      8: return i ? 9'o371 : 9'o247;
      default: return i ? 9'o753 : 9'o561;
    endcase
  endfunction

  real sigma;
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction
  function automatic soft_t channel(logic c, ref int raw_err);
    real y, q;
    y = (c ? 1.0 : -1.0) + sigma * gauss();
    if ((y > 0.0) != c) raw_err++;
    q = 7.5 + 3.75 * y;
    if (q < 0.0) q = 0.0;
    if (q > 15.0) q = 15.0;
    return soft_t'(int'(q));
  endfunction

  int         enc_k = 7;
  logic [8:0] hist = '0;
  logic       exp_bits [int];
  int         n_in = 0, n_out = 0, dec_err = 0, raw_err = 0;

  always @(posedge clk)
    if (rst_n && dec_valid) begin
      if (!exp_bits.exists(n_out) || exp_bits[n_out] != dec_bit) dec_err++;
      n_out++;
    end

  task automatic send_bit(logic u);
    logic [8:0] h;
    logic [1:0] c;
    h = {hist[7:0], u};
    c = '0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < enc_k; j++)
        c[i] = c[i] ^ (poly(enc_k, i)[enc_k-1-j] & h[j]);
    sym0 = channel(c[0], raw_err);
    sym1 = channel(c[1], raw_err);
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
    hist = h;
    exp_bits[n_in] = u;
    n_in++;
  endtask

  task automatic reconfigure(int k, int m);
    int t0;
    for (int i = 0; i < enc_k - 1; i++) send_bit(1'b0);   // terminate the trellis
    constraint_length = klen_t'(k);
    decoding_depth = dmul_t'(m);
    reconfig_req = 1'b1;
    t0 = cycle;
    while (!reconfig_ack && cycle - t0 < 2000) begin @(posedge clk); #1; end
    reconfig_req = 1'b0;
    checks++;
    if (!reconfig_ack || n_out != n_in) begin
      failures++; $display("reconfiguration: ack %b in %0d out %0d", reconfig_ack, n_in, n_out);
    end
    enc_k = k;
    hist = '0;
  endtask

  int spec_k_list [9] = '{7, 7, 6, 6, 5, 5, 4, 4, 8};
  int spec_m_list [9] = '{4, 3, 4, 3, 4, 3, 4, 3, 4};

  initial begin
    sigma = $sqrt(1.0 / (10.0 ** (EBN0_DB / 10.0)));   // Es = Eb / 2, N0/2 per dimension
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 9; r++) begin
      int e0, d0, i0;
      reconfigure(spec_k_list[r], spec_m_list[r]);
      e0 = raw_err; i0 = n_in;
      for (int i = 0; i < N_BITS; i++) send_bit(1'($urandom));
      reconfigure(spec_k_list[r], spec_m_list[r]);        // flush this run
      d0 = dec_err;
      $display("spec (K=%0d, %0dK): bits %0d  channel hard errors %0d (%.4f)  decoded errors %0d (%.5f)",
               spec_k_list[r], spec_m_list[r], n_in - i0, raw_err - e0,
               real'(raw_err - e0) / real'(2 * (n_in - i0)), d0, real'(d0) / real'(n_in - i0));
      checks++;
      if (d0 * 5 > (raw_err - e0)) begin
        failures++; $display("  decoding gain too small");
      end
      dec_err = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
