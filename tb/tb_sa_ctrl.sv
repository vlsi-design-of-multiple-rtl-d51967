// tb_sa_ctrl: the systolic array control against a model of the array's
// type2 outputs. The model numbers the input steps ("slots"): at clock c the
// component at depth j shows slot c-1-2j, with a pseudo-random bit and a valid
// flag (some slots are bubbles, slots before 0 and after the stream end are
// empty). The decoder output must be the valid slots' bits, each exactly once
// and in order, through depth changes of every kind; then, with the stream
// ended and reconfig_req_sig high, decode_finish must rise only after the last
// slot is out, and the new constraint length must clear exactly the
// components deeper than 4K.
module tb_sa_ctrl;
  import vd_pkg::*;

  logic   clk = 0, rst_n = 0, reconfig_req_sig = 0, any_valid;
  klen_t  k = 4'd7;
  dmul_t  dmul = 3'd4;
  logic   tap_load [N_TAPS], tap_bit [N_TAPS];
  logic   clr [MAX_DEPTH+1];
  logic   decode_finish, dec_bit, dec_valid, in_window;
  depth_t cur_depth;
  int checks = 0, failures = 0;

  sa_ctrl dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  int s_end = 1 << 30;
  int s_start2 = 1 << 30;   // a second stream after the reconfiguration

  function automatic bit slot_bit(int s);
    return 1'((s * 1103515245 + 12345) >>> 7);
  endfunction
  function automatic bit slot_valid(int s);
    return ((s >= 0 && s < s_end) || s >= s_start2) && (((s * 2654435761) >>> 5) % 10) != 3;
  endfunction

  // Depth of each type2 component, listed independently.
  int TD [N_TAPS] = '{6, 8, 9, 10, 12, 14, 15, 16, 18, 20, 21, 24, 27, 28, 32, 36};

  always_comb begin
    for (int t = 0; t < N_TAPS; t++) begin
      tap_load[t] = slot_valid(cyc - 1 - 2 * TD[t]);
      tap_bit[t]  = slot_bit(cyc - 1 - 2 * TD[t]);
    end
    any_valid = (cyc - 2 - 2 * MAX_DEPTH) < s_end || cyc >= s_start2;
  end

  int next_slot = 0;
  int gaps = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_window && dut.mode == 2'd2 && dut.n == 0) gaps++;   // longer, register empty
    if (rst_n && dec_valid) begin
      while (!slot_valid(next_slot) && next_slot < cyc) next_slot++;
      checks++;
      if (dec_bit !== slot_bit(next_slot)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: slot %0d bit %b exp %b", cyc, next_slot, dec_bit, slot_bit(next_slot));
      end
      next_slot++;
    end
  end

  task automatic set_depth(int m, int run);
    dmul = dmul_t'(m);
    @(posedge clk); #1;
    while (in_window) @(posedge clk);
    #1;
    checks++;
    if (int'(cur_depth) != m * int'(k)) begin failures++; $display("depth %0d exp %0d", cur_depth, m * int'(k)); end
    repeat (run) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (100) @(posedge clk);
    #1;
    set_depth(2, 40);        // 28 -> 14: shorter, empty register
    set_depth(3, 40);        // 14 -> 21: longer, from the register
    set_depth(2, 40);        // 21 -> 14: shorter, filled register
    set_depth(4, 40);        // 14 -> 28: longer, register runs dry
    set_depth(3, 40);        // shorter again
    set_depth(4, 40);        // longer, exactly drains the register
    // end of stream, reconfiguration request
    s_end = cyc + 10;
    repeat (20) @(posedge clk);
    #1 reconfig_req_sig = 1;
    while (!decode_finish) begin
      @(posedge clk); #1;
      if (cyc > 100000) break;
    end
    checks++;
    if (cyc - 1 - 2 * 28 < s_end) begin failures++; $display("finish before the stream ended"); end
    while (!slot_valid(next_slot) && next_slot < s_end) next_slot++;
    checks++;
    if (next_slot != s_end) begin failures++; $display("finish with slots left: next %0d end %0d", next_slot, s_end); end
    k = 4'd5; dmul = 3'd2;
    @(posedge clk); #1;
    reconfig_req_sig = 0;
    @(posedge clk); #1;
    checks++;
    if (cur_depth != 6'd10) begin failures++; $display("depth after reconfig %0d", cur_depth); end
    for (int j = 0; j <= MAX_DEPTH; j++) begin
      checks++;
      if (clr[j] !== (j > 20)) begin failures++; $display("clr[%0d] = %b", j, clr[j]); end
    end
    checks++;
    if (gaps != 0) begin failures++; $display("gap while the register could serve"); end
    // second stream at K = 5, D = 10: 10 -> 15 must open a Valid_out gap
    s_start2 = cyc + 5;
    next_slot = s_start2;
    repeat (60) @(posedge clk);
    #1;
    set_depth(3, 40);
    set_depth(2, 40);
    set_depth(4, 40);
    checks++;
    if (gaps == 0) begin failures++; $display("no Valid_out gap seen"); end
    $display("gaps=%0d", gaps);
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
