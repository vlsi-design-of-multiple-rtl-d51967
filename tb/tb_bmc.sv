// tb_bmc: random soft symbol pairs at random constraint lengths; every branch
// metric must equal the soft distance of the symbols from the reference
// codeword one clock after the pair is taken, and nothing is taken while
// Enable is low.
module tb_bmc;
  import vd_pkg::*;

  logic  clk = 0, rst_n = 0, en = 0, in_valid = 0, out_valid;
  klen_t k = 4'd7;
  soft_t sym0 = '0, sym1 = '0;
  bm_t   bm [NS][2];
  int checks = 0, failures = 0;

  bmc dut (.*);
  always #5 clk = ~clk;

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
  function automatic logic ref_bit(int kk, int s, int b, int i);
    logic [9:0] r;
    logic [8:0] g;
    logic c;
    r = 10'(s) | (10'(b) << (kk - 1));
    g = poly(kk, i);
    c = 0;
    for (int j = 0; j < kk; j++) if (g[kk-1-j]) c ^= r[j];
    return c;
  endfunction
  function automatic int ref_bm(int kk, int s, int b, int r0, int r1);
    if (s >= (1 << (kk - 1))) return r0 + r1;   // codeword reads 00
    return (ref_bit(kk, s, b, 0) ? 15 - r0 : r0) + (ref_bit(kk, s, b, 1) ? 15 - r1 : r1);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      int kk, r0, r1;
      bit go;
      kk = $urandom_range(3, 9);
      r0 = $urandom_range(0, 15);
      r1 = $urandom_range(0, 15);
      go = $urandom_range(0, 3) != 0;
      k = klen_t'(kk); sym0 = soft_t'(r0); sym1 = soft_t'(r1);
      in_valid = 1; en = go;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (out_valid !== go) begin failures++; $display("out_valid %b expected %b", out_valid, go); end
      if (go)
        for (int s = 0; s < NS; s++)
          for (int b = 0; b < 2; b++) begin
            checks++;
            if (int'(bm[s][b]) != ref_bm(kk, s, b, r0, r1)) begin
              failures++;
              if (failures < 10) $display("K=%0d s=%0d b=%0d bm %0d exp %0d", kk, s, b, bm[s][b], ref_bm(kk, s, b, r0, r1));
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
