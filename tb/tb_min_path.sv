// tb_min_path: random vectors with many ties into an 8-input and a 128-input
// tree; value and index must match a linear scan that keeps the first minimum.
module tb_min_path;
  localparam int W = 10;

  logic [W-1:0] v8 [8],   m8;
  logic [2:0]   i8;
  logic [W-1:0] v128 [128], m128;
  logic [6:0]   i128;
  int checks = 0, failures = 0;

  min_path #(.N(8),   .W(W)) dut8   (.val(v8),   .min_val(m8),   .min_idx(i8));
  min_path #(.N(128), .W(W)) dut128 (.val(v128), .min_val(m128), .min_idx(i128));

  initial begin
    for (int it = 0; it < 500; it++) begin
      int best, bi, range;
      range = (it % 2) ? 8 : 1000;
      foreach (v8[i])   v8[i]   = W'($urandom_range(0, range));
      foreach (v128[i]) v128[i] = W'($urandom_range(0, range));
      #1;
      best = 1 << W; bi = 0;
      foreach (v8[i]) if (int'(v8[i]) < best) begin best = v8[i]; bi = i; end
      checks++;
      if (int'(m8) != best || int'(i8) != bi) begin
        failures++; $display("N=8: got %0d@%0d exp %0d@%0d", m8, i8, best, bi);
      end
      best = 1 << W; bi = 0;
      foreach (v128[i]) if (int'(v128[i]) < best) begin best = v128[i]; bi = i; end
      checks++;
      if (int'(m128) != best || int'(i128) != bi) begin
        failures++; $display("N=128: got %0d@%0d exp %0d@%0d", m128, i128, best, bi);
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
