// tb_sa_cell: random enables, decision vectors and states into one component.
// Checks the two-clock decision-vector path (Out_enb, Dec_vector), Load_out,
// Final_output, the predecessor computed from the vector in the first
// register (state unchanged when that vector is not valid) and the clear.
module tb_sa_cell;
  import vd_pkg::*;

  logic    clk = 0, rst_n = 0, clr = 0, in_enb = 0;
  klen_t   k = 4'd7;
  decvec_t dec_in = '0, dec_out;
  state_t  min_state_in = '0, min_state_out;
  logic    out_enb, load_out, final_out;
  int checks = 0, failures = 0;

  sa_cell dut (.*);
  always #5 clk = ~clk;

  // history of what was applied before each edge
  logic    h_enb [$];
  decvec_t h_dec [$];
  state_t  h_st  [$];
  decvec_t last1, last2;   // value last loaded into each register
  bit      seen_skip = 0, seen_step = 0;

  initial begin
    last1 = '0; last2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int kk;
      logic e1;
      decvec_t d1;
      state_t  st, exp_ms;
      kk = 3 + (it / 60) % 7;
      k = klen_t'(kk);
      in_enb = $urandom_range(0, 3) != 0;
      for (int w = 0; w < NS / 32; w++) dec_in[w*32 +: 32] = $urandom;
      min_state_in = state_t'($urandom_range(0, (1 << (kk - 1)) - 1));
      clr = (it % 97 == 50);
      @(posedge clk);
      h_enb.push_front(in_enb); h_dec.push_front(dec_in); h_st.push_front(min_state_in);
      if (clr) begin
        #1;
        checks++;
        if (out_enb || load_out || min_state_out != 0) begin failures++; $display("clear failed"); end
        h_enb.delete(); h_dec.delete(); h_st.delete();
        last1 = '0; last2 = '0;
        continue;
      end
      #1;
      // register 1 / state register: applied one edge ago
      e1 = h_enb[0];
      if (e1) begin
        last2 = (h_enb.size() > 1 && h_enb[1]) ? last1 : last2;
        last1 = h_dec[0];
      end else if (h_enb.size() > 1 && h_enb[1]) last2 = last1;
      st = h_st[0];
      d1 = last1;
      exp_ms = e1 ? (((st >> 1) | (state_t'(d1[st]) << (kk - 2))) & state_t'((1 << (kk - 1)) - 1)) : st;
      checks++;
      if (load_out !== e1 || final_out !== st[0] || min_state_out !== exp_ms) begin
        failures++;
        if (failures < 10) $display("it %0d: load %b/%b fin %b ms %0d exp %0d", it, load_out, e1, final_out, min_state_out, exp_ms);
      end
      if (e1) seen_step = 1; else seen_skip = 1;
      if (h_enb.size() > 1) begin
        checks++;
        if (out_enb !== h_enb[1] || (out_enb && dec_out !== h_dec[1])) begin
          failures++;
          if (failures < 10) $display("it %0d: out_enb %b exp %b", it, out_enb, h_enb[1]);
        end
      end
    end
    checks++;
    if (!seen_skip || !seen_step) failures++;
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
