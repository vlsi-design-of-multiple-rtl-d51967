// tb_systolic_array: the traceback array on its own. The testbench draws a
// random input-bit sequence, follows the trellis states it produces and builds
// decision vectors whose survivor bit at each true state points to the true
// predecessor (all other bits random), with the true state as the best state.
// A correct traceback must then return exactly the input bits, in order, with
// a first-output latency of 2D + 2 clocks, across input bubbles, depth
// changes, and a drain for reconfiguration (decode_finish only after the last
// bit), at constraint lengths 7 and 4.
module tb_systolic_array;
  import vd_pkg::*;

  logic    clk = 0, rst_n = 0, reconfig_req_sig = 0, in_enb = 0;
  klen_t   k = 4'd7;
  dmul_t   dmul = 3'd4;
  decvec_t dec_in = '0;
  state_t  min_state_in = '0;
  logic    decode_finish, dec_bit, dec_valid, in_window;
  depth_t  cur_depth;
  int checks = 0, failures = 0;

  systolic_array dut (.*);
  always #5 clk = ~clk;

  int     cyc = 0;
  logic   exp_bits [int];
  int     n_in = 0, n_out = 0;
  int     kk = 7;
  state_t st = '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dec_valid) begin
      checks++;
      if (!exp_bits.exists(n_out) || exp_bits[n_out] !== dec_bit) begin
        failures++;
        if (failures < 10) $display("bit %0d wrong at cycle %0d", n_out, cyc);
      end
      n_out++;
    end
  end

  task automatic step(int bubble_pct);
    logic   u;
    state_t nst;
    decvec_t d;
    if ($urandom_range(0, 99) < bubble_pct) begin
      in_enb = 0;               // the ACS output holds between steps
      @(posedge clk); #1;
      return;
    end
    u = 1'($urandom);
    nst = state_t'(((int'(st) << 1) | int'(u)) & ((1 << (kk - 1)) - 1));
    for (int w = 0; w < NS / 32; w++) d[w*32 +: 32] = $urandom;
    d[nst] = st[kk-2];          // survivor of the true state: the true predecessor
    dec_in = d;
    min_state_in = nst;
    in_enb = 1;
    st = nst;
    exp_bits[n_in] = u;
    n_in++;
    @(posedge clk); #1;
    in_enb = 0;
  endtask

  task automatic drain_and_switch(int newk, int newm);
    int t0;
    repeat (3) @(posedge clk);
    #1 reconfig_req_sig = 1;
    t0 = cyc;
    while (!decode_finish && cyc - t0 < 500) begin @(posedge clk); #1; end
    checks++;
    if (!decode_finish || n_out != n_in) begin
      failures++; $display("drain: finish %b in %0d out %0d", decode_finish, n_in, n_out);
    end
    k = klen_t'(newk); dmul = dmul_t'(newm); kk = newk; st = '0;
    @(posedge clk); #1;
    reconfig_req_sig = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // first-output latency at D = 28
    t0 = cyc;
    fork
      begin
        while (!dec_valid) @(posedge clk);
        checks++;
        if (cyc - t0 != 2 * 28 + 2) begin failures++; $display("latency %0d", cyc - t0); end
      end
      repeat (150) step(0);
    join
    repeat (150) step(25);
    dmul = 3'd2; repeat (120) step(10);     // shorter
    dmul = 3'd3; repeat (120) step(0);      // longer, from the register
    drain_and_switch(4, 2);
    repeat (100) step(10);
    dmul = 3'd4; repeat (100) step(0);      // longer with a gap
    dmul = 3'd3; repeat (100) step(0);      // shorter
    drain_and_switch(9, 4);
    checks++;
    if (n_out != n_in) failures++;
    $display("bits %0d", n_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
