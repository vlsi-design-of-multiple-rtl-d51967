// tb_control_block: the reconfiguration handshake. Checks that a depth
// multiplier is taken at any time while running, that a request stops the
// input (Enable low) and raises Reconfig_req_sig, that the controller waits for
// Decode_finish_sig however late it comes, that the new specification is set
// before the one-clock Reconfig_ark, that a held request does not restart the
// sequence, and that out-of-range requests keep the old values.
module tb_control_block;
  import vd_pkg::*;

  logic  clk = 0, rst_n = 0, reconfig_req = 0, decode_finish = 0;
  klen_t k_in = 4'd7, k;
  dmul_t dmul_in = 3'd4, dmul;
  logic  enable, reconfig_req_sig, reconfig_ack;
  int checks = 0, failures = 0;

  control_block dut (.*);
  always #5 clk = ~clk;

  task automatic expect_(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (k=%0d m=%0d en=%b sig=%b ack=%b)", what, k, dmul, enable, reconfig_req_sig, reconfig_ack); end
  endtask

  task automatic reconfig(int nk, int nm, int finish_delay, int ek, int em);
    int acks;
    k_in = klen_t'(nk); dmul_in = dmul_t'(nm);
    reconfig_req = 1;
    @(posedge clk); #1;
    expect_(!enable && reconfig_req_sig, "drain entered");
    repeat (finish_delay) begin
      @(posedge clk); #1;
      expect_(!enable && reconfig_req_sig && !reconfig_ack, "waiting for finish");
    end
    decode_finish = 1;
    acks = 0;
    repeat (8) begin
      @(posedge clk); #1;
      if (reconfig_ack) begin
        acks++;
        expect_(int'(k) == ek && int'(dmul) == em, "spec set at ack");
        expect_(enable && !reconfig_req_sig, "running at ack");
      end
    end
    expect_(acks == 1, "one ack");
    decode_finish = 0;
    reconfig_req = 0;
    @(posedge clk); #1;
    expect_(enable, "running again");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    expect_(k == 4'd7 && dmul == 3'd4 && enable && !reconfig_req_sig, "reset spec");
    dmul_in = 3'd2; @(posedge clk); #1;
    expect_(dmul == 3'd2, "depth taken while running");
    dmul_in = 3'd6; @(posedge clk); #1;
    expect_(dmul == 3'd2, "bad depth ignored");
    reconfig(5, 3, 10, 5, 3);
    reconfig(9, 2, 0, 9, 2);
    reconfig(12, 7, 3, 9, 2);      // out of range: keep
    reconfig(3, 4, 40, 3, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
