// tb_codeword_store: checks every entry of the codeword LUT for K = 3..9
// against a bit-serial reference encoder with its own copy of the generator
// polynomials, and that branches into states beyond 2^(K-1) read 0.
module tb_codeword_store;
  import vd_pkg::*;

  klen_t      k;
  logic [1:0] cw [NS][2];
  int checks = 0, failures = 0;

  codeword_store dut (.k(k), .cw(cw));

  function automatic logic [8:0] poly(int kk, int i);
    case (kk)
      3: return i ? 9'o5   : 9'o7;
      4: return i ? 9'o17  : 9'o15;
      5: return i ? 9'o35  : 9'o23;
      6: return i ? 9'o75  : 9'o53;
      7: return i ? 9'o133 : 9'o171;
      8: return i ? 9'o371 : 9'o247;
      default: return i ? 9'o753 : 9'o561;
    endcase
  endfunction

  // Encoder in state s (bit j = input j steps ago, after the current input)
  // entered from a predecessor whose oldest bit is b.
  function automatic logic [1:0] ref_cw(int kk, int s, int b);
    logic [9:0] reg_bits;   // reg_bits[0] = current input
    logic [1:0] c;
    reg_bits = 10'(s) | (10'(b) << (kk - 1));
    for (int i = 0; i < 2; i++) begin
      logic [8:0] g;
      g = poly(kk, i);
      c[i] = 1'b0;
      for (int j = 0; j < kk; j++)
        if (g[kk-1-j]) c[i] ^= reg_bits[j];
    end
    return c;
  endfunction

  initial begin
    for (int kk = 3; kk <= 9; kk++) begin
      k = klen_t'(kk);
      #1;
      for (int s = 0; s < NS; s++)
        for (int b = 0; b < 2; b++) begin
          logic [1:0] e;
          e = (s < (1 << (kk - 1))) ? ref_cw(kk, s, b) : 2'b00;
          checks++;
          if (cw[s][b] !== e) begin
            failures++;
            if (failures < 10) $display("K=%0d s=%0d b=%0d got %b exp %b", kk, s, b, cw[s][b], e);
          end
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
