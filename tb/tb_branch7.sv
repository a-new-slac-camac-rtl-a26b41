// tb_branch7: a full SLAC branch of seven CCU2 crates (addresses 0..6, the
// most distant one set as Last Crate) chained for LAM priority in address
// order. Random LAM patterns are raised in a random subset of crates; the
// host then runs the LAM procedure until BL drops: (a) read status from all
// crates with N25 F4 to find the crate holding LRI, (b) read its LAM word
// with N25 F1, (c) remove its LAM sum, alternately by clearing EL with a
// control word and by clearing the LAM sources. The crates must be served in
// priority order, each exactly once, with the LAM words raised.
module tb_branch7
  import ccu2_pkg::*;
;
  localparam int NC = 7;
  logic clk = 0, rst_n;
  ccu2_switches_t sw [NC];
  logic [2:0]  bcr;
  logic [4:0]  bn, bf;
  logic [3:0]  ba;
  logic [23:0] bw, br;
  logic bs1, bs2, bc, bz, bi, pbb, bq, bx, crr, bt, bl, lri_bus;
  logic [23:0] br_c [NC], dw_l [NC];
  logic [NC-1:0] bq_c, bx_c, crr_c, bt_c, bl_c, lrq_c, lgo_c, lri_c, lgi_c;
  int checks = 0, failures = 0;

  always_comb begin
    br = '0;
    for (int i = 0; i < NC; i++) br |= br_c[i];
  end
  assign bq = |bq_c;
  assign bx = |bx_c;
  assign crr = |crr_c;
  assign bt = |bt_c;
  assign bl = |bl_c;
  assign lri_bus = |lri_c;
  assign lgi_c = {lgo_c[NC-2:0], 1'b1};

  for (genvar i = 0; i < NC; i++) begin : g_crate
    logic [23:0] dw_n, dw_w, acb_l;
    logic [3:0]  dw_a;
    logic [4:0]  dw_f;
    logic dw_b, dw_s1, dw_s2, dw_c, dw_z, dw_i, acb_gnt, acb_ri, acb_acl;
    logic fp_el, fp_brq, fp_aclrq, fp_iflag, fp_lri, fp_acidl;
    ccu2 dut (
      .clk, .rst_n, .sw(sw[i]), .bcr, .bn, .ba, .bf, .bw, .br(br_c[i]),
      .bq(bq_c[i]), .bx(bx_c[i]), .bs1, .bs2, .bc, .bz, .bi, .pbb,
      .crr(crr_c[i]), .bt(bt_c[i]), .bl(bl_c[i]), .lgi(lgi_c[i]), .lri_in(lri_bus),
      .lrq(lrq_c[i]), .lgo(lgo_c[i]), .lri_out(lri_c[i]),
      .dw_n, .dw_a, .dw_f, .dw_w, .dw_r(24'd0), .dw_q(1'b0), .dw_x(1'b0),
      .dw_l(dw_l[i]), .dw_b, .dw_s1, .dw_s2, .dw_c, .dw_z, .dw_i,
      .acb_n(5'd0), .acb_l, .acb_req(1'b0), .acb_busy(1'b0), .acb_gnt, .acb_ri, .acb_acl,
      .fp_el, .fp_brq, .fp_aclrq, .fp_iflag, .fp_lri, .fp_acidl
    );
  end

  always #50 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t %s", $time, msg);
    end
  endtask

  task automatic op(input logic [2:0] cr, input logic [4:0] f, input logic [23:0] wd,
                    output logic [23:0] rd, output logic x, output logic ok);
    int k = 0;
    bcr = cr; bn = N_CC; ba = 0; bf = f; bw = wd;
    rd = '0; x = 0; ok = 0;
    @(negedge clk); pbb = 1;
    while (!crr && k < 400) begin @(negedge clk); k++; end
    if (crr) begin
      ok = 1;
      while (!bt && k < 400) begin @(negedge clk); k++; end
      while (bt && k < 400) begin @(negedge clk); k++; end
      rd = br; x = bx;
    end
    pbb = 0;
    while (crr && k < 800) begin @(negedge clk); k++; end
    @(negedge clk);
  endtask

  logic [23:0] lam_pat [NC];
  logic [23:0] rd;
  logic x, ok;
  int served [$];
  int rounds;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; bcr = 3'd0; bn = 0; ba = 0; bf = 0; bw = 0;
    {bs1, bs2, bc, bz, bi, pbb} = '0;
    for (int i = 0; i < NC; i++) begin
      sw[i] = '{mcra: 4'(i), mode: (i == NC - 1) ? 3'd5 : 3'd4, elrg: 1'b1,
                aclrq_en: 1'b0, offline: 1'b0, ebrq: 1'b0, ebi: 1'b0};
      dw_l[i] = '0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (40) @(negedge clk);

    for (int trial = 0; trial < 6; trial++) begin
      int expect_order [$];
      expect_order.delete();
      // random LAMs in a random subset of crates, EL still off
      for (int i = 0; i < NC; i++) begin
        lam_pat[i] = ($urandom % 3 == 0) ? 24'd0 : (24'($urandom) | 24'd1);
        dw_l[i] = lam_pat[i];
        if (lam_pat[i] != 0) expect_order.push_back(i);
      end
      repeat (3) @(negedge clk);
      check(!bl, "no BL before EL is set");
      op(3'd7, F_WR_CTRL, 24'h000001, rd, x, ok);   // EL on in all crates
      check(ok, "CR7 control word answered by Last Crate");
      repeat (3) @(negedge clk);
      served.delete();
      rounds = 0;
      while (bl && rounds < 10) begin
        int c;
        rounds++;
        op(3'd7, F_RD_STATUS_LRI, 24'h0, rd, x, ok);            // step a
        c = int'(rd[11:8]);
        check(ok && x && rd[18], "status from the crate holding LRI");
        op(3'(c), F_RD_LAM, 24'h0, rd, x, ok);                  // step b
        check(ok && rd == lam_pat[c], $sformatf("LAM word of crate %0d", c));
        served.push_back(c);
        if (rounds % 2 == 1) op(3'(c), F_WR_CTRL, 24'h0, rd, x, ok);  // step c: mask EL
        else dw_l[c] = '0;                                             // or clear sources
        repeat (4) @(negedge clk);
      end
      check(served.size() == expect_order.size(), "every crate with a LAM served once");
      for (int j = 0; j < served.size() && j < expect_order.size(); j++)
        check(served[j] == expect_order[j], $sformatf("service order %0d: crate %0d", j, served[j]));
      for (int i = 0; i < NC; i++) dw_l[i] = '0;
      op(3'd7, F_WR_CTRL, 24'h000000, rd, x, ok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
