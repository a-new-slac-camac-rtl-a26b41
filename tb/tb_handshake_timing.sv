// tb_handshake_timing: branch handshake and timing generator through the
// mode-switch settings. An ACB model returns ACIDL three clocks after CCRQ.
// Each operation raises PBB, holds it for a fixed time and drops it, while a
// monitor measures, in clocks (100 ns each), the Busy, S1, S2, BT and CRR
// intervals and their offsets from the start of Busy. Expected values come
// from the nominal 1 us cycle (B 1000 ns, S1 400-600 ns, S2 700-900 ns, BT
// until the end of S1) and its doubled 2 us form.
module tb_handshake_timing;
  logic clk = 0, rst_n;
  logic [2:0] mode;
  logic offline, addressed, all_crates, n25, global_cz, pbb, bs1, bs2, local_req, acidl;
  logic ccrq, forced_acl, crr, bt, dw_b, dw_s1, dw_s2, int_s1, dw_cycle, br_window;
  logic local_cycle, cycle_done;
  logic [2:0] acb_sr;
  int t = 0;
  int b_clks, s1_clks, s2_clks, bt_clks, crr_clks, is1_clks, done_cnt, ccrq_clks, facl_clks;
  int b_start, s1_start, s2_start, crr_start;
  int checks = 0, failures = 0;

  handshake_timing dut (.*);

  always #5 clk = ~clk;

  // ACB model: control is granted three clocks after the request
  always_ff @(posedge clk) acb_sr <= {acb_sr[1:0], ccrq};
  assign acidl = ccrq && (&acb_sr);

  always @(posedge clk) begin
    t <= t + 1;
    if (dw_b)       begin if (b_clks == 0) b_start = t; b_clks++; end
    if (dw_s1)      begin if (s1_clks == 0) s1_start = t; s1_clks++; end
    if (dw_s2)      begin if (s2_clks == 0) s2_start = t; s2_clks++; end
    if (crr)        begin if (crr_clks == 0) crr_start = t; crr_clks++; end
    if (bt)         bt_clks++;
    if (int_s1)     is1_clks++;
    if (cycle_done) done_cnt++;
    if (ccrq)       ccrq_clks++;
    if (forced_acl) facl_clks++;
  end

  task automatic clear();
    {b_clks, s1_clks, s2_clks, bt_clks, crr_clks, is1_clks, done_cnt, ccrq_clks, facl_clks} = '0;
    {b_start, s1_start, s2_start, crr_start} = '0;
  endtask

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: B=%0d@%0d S1=%0d@%0d S2=%0d@%0d BT=%0d CRR=%0d@%0d iS1=%0d done=%0d ccrq=%0d facl=%0d",
               msg, b_clks, b_start, s1_clks, s1_start, s2_clks, s2_start, bt_clks,
               crr_clks, crr_start, is1_clks, done_cnt, ccrq_clks, facl_clks);
    end
  endtask

  // a branch operation: PBB for `hold` clocks; strobes from the branch
  // driver (bs1 at 5..7, bs2 at 9..11 clocks after CRR) if `drv` is set
  task automatic branch_op(input int hold, input logic drv);
    clear();
    @(negedge clk); pbb = 1;
    for (int i = 0; i < hold; i++) begin
      @(negedge clk);
      if (drv) begin
        bs1 = (crr_clks >= 5 && crr_clks < 7);
        bs2 = (crr_clks >= 9 && crr_clks < 11);
      end
    end
    bs1 = 0; bs2 = 0; pbb = 0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; mode = 3'd4; offline = 0; addressed = 0; all_crates = 0; n25 = 0;
    global_cz = 0; pbb = 0; bs1 = 0; bs2 = 0; local_req = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // mode 4: handshake, internal 1 us cycle
    addressed = 1;
    branch_op(40, 0);
    check(b_clks == 10, "1 us cycle: Busy 10 clocks");
    check(s1_clks == 2 && s1_start - b_start == 4, "1 us cycle: S1 400-600 ns");
    check(s2_clks == 2 && s2_start - b_start == 7, "1 us cycle: S2 700-900 ns");
    check(bt_clks == 6, "BT from start of cycle to end of S1");
    check(crr_start == b_start, "CRR when cycle starts");
    check(crr_clks >= 30, "CRR held until PBB released");
    check(done_cnt == 1 && is1_clks == 2, "one cycle done");
    check(facl_clks == 0, "no forced ACL for own crate");

    // mode 6: 2 us cycle
    mode = 3'd6;
    branch_op(40, 0);
    check(b_clks == 20 && s1_clks == 4 && s1_start - b_start == 8, "2 us cycle: Busy and S1");
    check(s2_clks == 4 && s2_start - b_start == 14 && bt_clks == 12, "2 us cycle: S2 and BT");

    // all crates, not last crate: cycle runs, CRR/BT stay off, ACL forced
    mode = 3'd4; all_crates = 1;
    branch_op(40, 0);
    check(b_clks == 10 && crr_clks == 0 && bt_clks == 0, "CR7 on non-last crate: no CRR/BT");
    check(facl_clks > 0, "CR7 forces ACL");
    // all crates, last crate
    mode = 3'd5;
    branch_op(40, 0);
    check(b_clks == 10 && crr_clks > 0 && bt_clks == 6, "CR7 on last crate: CRR and BT");
    // global C/Z: no S1
    global_cz = 1;
    branch_op(40, 0);
    check(b_clks == 10 && s1_clks == 0 && s2_clks == 2, "C/Z cycle has no S1");
    global_cz = 0; all_crates = 0;

    // mode 2: branch driver timing
    mode = 3'd2;
    branch_op(30, 1);
    check(crr_clks > 0 && bt_clks == 0, "branch timing: CRR, no BT");
    check(s1_clks == 2 && s2_clks == 2 && s1_start - crr_start == 5, "branch timing: strobes from branch");
    check(b_clks >= 20 && done_cnt == 1, "branch timing: Busy until PBB drops");

    // N25 command: handshake without arbitration or Dataway strobes
    mode = 3'd4; n25 = 1;
    branch_op(40, 0);
    check(ccrq_clks == 0 && crr_clks > 0 && b_clks == 0 && s1_clks == 0, "N25: no Dataway cycle");
    check(is1_clks == 2 && bt_clks == 6, "N25: internal S1 and BT");
    n25 = 0;
    // offline crate: same as N25 for Dataway commands
    offline = 1;
    branch_op(40, 0);
    check(ccrq_clks == 0 && crr_clks > 0 && b_clks == 0, "OFFLINE: no Dataway cycle");
    offline = 0;
    // not addressed: nothing
    addressed = 0;
    branch_op(40, 0);
    check(crr_clks == 0 && b_clks == 0 && ccrq_clks == 0, "not addressed: silent");

    // local C/Z flag cycle
    clear();
    @(negedge clk); local_req = 1;
    wait (local_cycle); @(negedge clk); local_req = 0;
    repeat (30) @(negedge clk);
    check(b_clks == 10 && s1_clks == 0 && s2_clks == 2, "local cycle: 1 us, no S1");
    check(crr_clks == 0 && facl_clks > 0 && done_cnt == 1, "local cycle: forced ACL, no CRR");

    // mode 0: old SLAC branch, transparent strobes, control held
    mode = 3'd0; addressed = 1;
    repeat (6) @(negedge clk);
    clear();
    bs1 = 1; #1;
    check(dw_s1 && dw_b && int_s1, "old mode: S1 passes through");
    bs1 = 0; bs2 = 1; #1;
    check(dw_s2 && !dw_s1, "old mode: S2 passes through");
    addressed = 0; #1;
    check(!dw_s2 && !dw_b, "old mode: other crate addressed");
    bs2 = 0;
    repeat (2) @(negedge clk);
    check(ccrq_clks > 0 && crr_clks == 0, "old mode: control held, no handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
