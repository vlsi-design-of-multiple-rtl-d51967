// tb_acs_unit: random operands, including forced ties; the new metric must be
// the smaller candidate sum and the decision must name it (ties keep 0).
module tb_acs_unit;
  import vd_pkg::*;

  pm_t pm0, pm1, pm_new;
  bm_t bm0, bm1;
  logic dec;
  int checks = 0, failures = 0;

  acs_unit dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int a, b, c, d, e0, e1;
      a = $urandom_range(0, 400); b = $urandom_range(0, 400);
      c = $urandom_range(0, 30);  d = $urandom_range(0, 30);
      if (it % 5 == 0) b = a + c - d >= 0 ? a + c - d : b;   // tie
      pm0 = pm_t'(a); pm1 = pm_t'(b); bm0 = bm_t'(c); bm1 = bm_t'(d);
      #1;
      e1 = (b + d < a + c);
      e0 = e1 ? b + d : a + c;
      checks++;
      if (dec !== 1'(e1) || int'(pm_new) != e0) begin
        failures++;
        if (failures < 10) $display("%0d+%0d vs %0d+%0d: got %0d/%b", a, c, b, d, pm_new, dec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
