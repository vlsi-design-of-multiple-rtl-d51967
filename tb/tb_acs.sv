// tb_acs: random branch metrics through the ACS block at several constraint
// lengths, compared step by step with a reference add-compare-select written
// with plain integers (path metrics restarted on every constraint-length
// change, normalised by the minimum, ties to predecessor 0 and to the lower
// state). Checks the decision vector (unused groups must read 0), the best
// state and the one-clock latency.
module tb_acs;
  import vd_pkg::*;

  logic    clk = 0, rst_n = 0, in_valid = 0, out_valid;
  klen_t   k = 4'd3;
  bm_t     bm [NS][2];
  decvec_t dec;
  state_t  min_state;
  int checks = 0, failures = 0;

  acs dut (.*);
  always #5 clk = ~clk;

  int rpm [NS];

  initial begin
    foreach (bm[s]) begin bm[s][0] = '0; bm[s][1] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 7; round++) begin
      int kk, ns;
      kk = (round == 6) ? 9 : 3 + round;
      ns = 1 << (kk - 1);
      k = klen_t'(kk);
      @(posedge clk); #1;                      // store restarts
      for (int s = 0; s < NS; s++) rpm[s] = (s == 0 || s >= ns) ? 0 : PM_INIT;
      for (int step = 0; step < 40; step++) begin
        logic [NS-1:0] ed;
        int nm [NS];
        int best, bs;
        for (int s = 0; s < NS; s++) begin
          bm[s][0] = bm_t'($urandom_range(0, 30));
          bm[s][1] = bm_t'($urandom_range(0, 30));
        end
        ed = '0; best = 1 << 30; bs = 0;
        for (int s = 0; s < ns; s++) begin
          int p0, p1, c0, c1;
          p0 = s >> 1; p1 = p0 + (1 << (kk - 2));
          c0 = rpm[p0] + bm[s][0]; c1 = rpm[p1] + bm[s][1];
          ed[s] = c1 < c0;
          nm[s] = ed[s] ? c1 : c0;
          if (nm[s] < best) begin best = nm[s]; bs = s; end
        end
        for (int s = 0; s < ns; s++) rpm[s] = nm[s] - best;
        in_valid = 1;
        @(posedge clk); #1;
        in_valid = 0;
        checks++;
        if (!out_valid || dec !== ed || int'(min_state) != bs) begin
          failures++;
          if (failures < 10) $display("K=%0d step %0d: valid %b best %0d exp %0d dec match %b",
                                      kk, step, out_valid, min_state, bs, dec === ed);
        end
        // an idle clock: outputs hold, out_valid drops
        if (step % 7 == 3) begin
          @(posedge clk); #1;
          checks++;
          if (out_valid || int'(min_state) != bs) begin failures++; $display("hold failed"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
