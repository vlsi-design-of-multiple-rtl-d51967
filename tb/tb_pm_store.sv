// tb_pm_store: after a constraint-length change the store must hold 0 for
// state 0, PM_INIT for the other active states and 0 beyond; on each valid
// step it must hold new - min for active states; without in_valid it holds.
module tb_pm_store;
  import vd_pkg::*;

  logic  clk = 0, rst_n = 0, in_valid = 0;
  klen_t k = 4'd5;
  pm_t   pm_new [NS], pm_min, pm [NS];
  pm_t   expv [NS];
  int checks = 0, failures = 0;

  pm_store dut (.*);
  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (pm[s] !== expv[s]) begin
        failures++;
        if (failures < 10) $display("%s: s=%0d got %0d exp %0d", what, s, pm[s], expv[s]);
      end
    end
  endtask

  initial begin
    foreach (pm_new[s]) pm_new[s] = '0;
    pm_min = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      int kk, ns;
      kk = 3 + (round * 2) % 7;
      ns = 1 << (kk - 1);
      k = klen_t'(kk);
      @(posedge clk); #1;
      foreach (expv[s]) expv[s] = (s == 0 || s >= ns) ? pm_t'(0) : pm_t'(PM_INIT);
      compare("restart");
      for (int it = 0; it < 5; it++) begin
        int mn;
        mn = $urandom_range(0, 50);
        foreach (pm_new[s]) pm_new[s] = pm_t'(mn + $urandom_range(0, 300));
        pm_min = pm_t'(mn);
        in_valid = ($urandom_range(0, 3) != 0);
        @(posedge clk); #1;
        if (in_valid)
          foreach (expv[s]) expv[s] = (s < ns) ? pm_new[s] - pm_t'(mn) : pm_t'(0);
        in_valid = 0;
        compare("step");
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
