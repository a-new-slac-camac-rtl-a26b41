// tb_ccu2: end-to-end test of two CCU2 crate controllers on one SLAC branch,
// at the default parameters (100 ns clock).
//
// Crate 0 (address 1) is first in the LAM priority chain and has an
// auxiliary controller model on its ACB; crate 1 (address 2) is the Last
// Crate. Each crate has a Dataway model with registers at every station. A
// branch driver task runs CAMAC operations with the PBB/CRR/BT handshake, with
// its own strobes (branch-driver timing) or in the old no-handshake mode.
// The test walks through every mechanism of the controller and counts how
// often each happened; a mechanism that never happened is a failure.
module tb_ccu2
  import ccu2_pkg::*;
;
  logic clk = 0, rst_n;
  ccu2_switches_t sw [2];
  logic [2:0]  bcr;
  logic [4:0]  bn, bf;
  logic [3:0]  ba;
  logic [23:0] bw;
  logic bs1, bs2, bc, bz, bi, pbb;
  logic [23:0] br_c [2];
  logic [1:0] bq_c, bx_c, crr_c, bt_c, bl_c, lrq_c, lgo_c, lri_c, lgi_c;
  logic [23:0] br;
  logic bq, bx, crr, bt, bl, lri_bus;
  logic [23:0] dw_n [2], dw_w [2], dw_r [2], dw_l [2], acb_l [2];
  logic [3:0]  dw_a [2];
  logic [4:0]  dw_f [2];
  logic [1:0] dw_q, dw_x, dw_b, dw_s1, dw_s2, dw_c, dw_z, dw_i;
  logic [1:0] acb_req, acb_busy, acb_gnt, acb_ri, acb_acl;
  logic [4:0] acb_n [2];
  logic [1:0] fp_el, fp_brq, fp_aclrq, fp_iflag, fp_lri, fp_acidl;
  int checks = 0, failures = 0;
  int crr_clks [2];
  int crr_lat;      // clocks from PBB to CRR in the last operation
  int acl_clks;

  typedef enum int {
    M_HS_1US, M_HS_2US, M_BRANCH_TIMING, M_OLD_MODE, M_LAST_CRATE, M_LAM_ARB,
    M_LAM_READ, M_TEST_LSUM, M_RG_WAIT, M_ACL, M_BLOCK, M_FORCED_ACL, M_C_FLAG,
    M_Z_FLAG, M_BRANCH_Z, M_POWERUP_Z, M_INHIBIT, M_OFFLINE, M_DISCONNECT,
    M_N25_ACB_BUSY, M_ACB_N, M_NUM
  } mech_t;
  int mech [M_NUM];

  assign br      = br_c[0] | br_c[1];
  assign bq      = |bq_c;
  assign bx      = |bx_c;
  assign crr     = |crr_c;
  assign bt      = |bt_c;
  assign bl      = |bl_c;
  assign lri_bus = |lri_c;
  assign lgi_c   = {lgo_c[0], 1'b1};

  for (genvar i = 0; i < 2; i++) begin : g_crate
    ccu2 dut (
      .clk, .rst_n, .sw(sw[i]), .bcr, .bn, .ba, .bf, .bw, .br(br_c[i]),
      .bq(bq_c[i]), .bx(bx_c[i]), .bs1, .bs2, .bc, .bz, .bi, .pbb,
      .crr(crr_c[i]), .bt(bt_c[i]), .bl(bl_c[i]), .lgi(lgi_c[i]), .lri_in(lri_bus),
      .lrq(lrq_c[i]), .lgo(lgo_c[i]), .lri_out(lri_c[i]),
      .dw_n(dw_n[i]), .dw_a(dw_a[i]), .dw_f(dw_f[i]), .dw_w(dw_w[i]), .dw_r(dw_r[i]),
      .dw_q(dw_q[i]), .dw_x(dw_x[i]), .dw_l(dw_l[i]), .dw_b(dw_b[i]),
      .dw_s1(dw_s1[i]), .dw_s2(dw_s2[i]), .dw_c(dw_c[i]), .dw_z(dw_z[i]), .dw_i(dw_i[i]),
      .acb_n(acb_n[i]), .acb_l(acb_l[i]), .acb_req(acb_req[i]), .acb_busy(acb_busy[i]),
      .acb_gnt(acb_gnt[i]), .acb_ri(acb_ri[i]), .acb_acl(acb_acl[i]),
      .fp_el(fp_el[i]), .fp_brq(fp_brq[i]), .fp_aclrq(fp_aclrq[i]),
      .fp_iflag(fp_iflag[i]), .fp_lri(fp_lri[i]), .fp_acidl(fp_acidl[i])
    );
    tb_dataway_model dwm (
      .clk, .dw_n(dw_n[i]), .dw_a(dw_a[i]), .dw_f(dw_f[i]), .dw_w(dw_w[i]),
      .dw_b(dw_b[i]), .dw_s1(dw_s1[i]), .dw_c(dw_c[i]), .dw_z(dw_z[i]),
      .dw_r(dw_r[i]), .dw_q(dw_q[i]), .dw_x(dw_x[i])
    );
  end

  always #50 clk = ~clk;   // 100 ns clock

  always @(posedge clk) begin
    for (int i = 0; i < 2; i++) if (crr_c[i]) crr_clks[i]++;
    if (acb_acl[0]) acl_clks++;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t %s", $time, msg);
    end
  endtask

  // One branch operation with the PBB/CRR handshake. With `drv` the branch
  // driver makes S1 and S2 itself, otherwise it samples at the end of BT.
  task automatic op(input logic [2:0] cr, input logic [4:0] n, input logic [3:0] a,
                    input logic [4:0] f, input logic [23:0] wd, input logic drv,
                    output logic [23:0] rd, output logic q, output logic x,
                    output int clocks, output logic ok);
    int k = 0;
    bcr = cr; bn = n; ba = a; bf = f; bw = wd;
    crr_clks = '{0, 0};
    rd = '0; q = 0; x = 0; ok = 0;
    @(negedge clk); pbb = 1;
    while (!crr && k < 400) begin @(negedge clk); k++; end
    crr_lat = k;
    if (crr) begin
      ok = 1;
      if (drv) begin
        repeat (2) @(negedge clk);
        bs1 = 1; repeat (2) @(negedge clk);
        rd = br; q = bq; x = bx; bs1 = 0;
        @(negedge clk); bs2 = 1; repeat (2) @(negedge clk); bs2 = 0;
        @(negedge clk);
      end else begin
        while (!bt && k < 400) begin @(negedge clk); k++; end
        while (bt && k < 400) begin @(negedge clk); k++; end
        rd = br; q = bq; x = bx;
      end
    end
    pbb = 0;
    while (crr && k < 800) begin @(negedge clk); k++; end
    clocks = k;
    @(negedge clk);
  endtask

  // old SLAC branch: no handshake, strobes straight from the driver
  task automatic old_op(input logic [2:0] cr, input logic [4:0] n, input logic [3:0] a,
                        input logic [4:0] f, input logic [23:0] wd,
                        output logic [23:0] rd, output logic q);
    bcr = cr; bn = n; ba = a; bf = f; bw = wd;
    repeat (2) @(negedge clk);
    bs1 = 1; repeat (2) @(negedge clk);
    rd = br; q = bq; bs1 = 0;
    @(negedge clk); bs2 = 1; repeat (2) @(negedge clk); bs2 = 0;
    bcr = 3'd6; bn = 0;
    repeat (2) @(negedge clk);
  endtask

  logic [23:0] rd;
  logic q, x, ok;
  int clocks, b0, b1, c0, z0, z1, w0;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mech[i]) mech[i] = 0;
    acl_clks = 0; crr_clks = '{0, 0};
    rst_n = 0; bcr = 3'd6; bn = 0; ba = 0; bf = 0; bw = 0;
    {bs1, bs2, bc, bz, bi, pbb} = '0;
    acb_req = 0; acb_busy = 0; acb_n[0] = 5'd0; acb_n[1] = 5'd0;
    dw_l[0] = '0; dw_l[1] = '0;
    sw[0] = '{mcra: 4'd1, mode: 3'd4, elrg: 1'b1, aclrq_en: 1'b0, offline: 1'b0, ebrq: 1'b0, ebi: 1'b0};
    sw[1] = '{mcra: 4'd2, mode: 3'd5, elrg: 1'b1, aclrq_en: 1'b0, offline: 1'b0, ebrq: 1'b0, ebi: 1'b0};
    repeat (3) @(negedge clk); rst_n = 1;

    // power-up initialise cycle in each crate
    repeat (30) @(negedge clk);
    check(g_crate[0].dwm.z_cycles == 1 && g_crate[1].dwm.z_cycles == 1, $sformatf("power-up Z cycle %0d %0d", g_crate[0].dwm.z_cycles, g_crate[1].dwm.z_cycles));
    check(fp_iflag == 2'b11 && dw_i == 2'b11, "power-up sets I flag");
    if (g_crate[0].dwm.z_cycles == 1) mech[M_POWERUP_Z]++;
    // clear the I flags in all crates: N25 F16 to CR7, Last Crate answers
    op(3'd7, 5'd25, 0, F_WR_CTRL, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && dw_i == 2'b00, "CR7 control word clears I in both crates");
    check(crr_clks[0] == 0 && crr_clks[1] > 0, "only the Last Crate answers CR7");
    if (ok && crr_clks[0] == 0) mech[M_LAST_CRATE]++;

    // mode 4: handshake, 1 us cycle
    b0 = g_crate[0].dwm.busy_clks;
    op(3'd1, 5'd5, 4'd2, 5'd16, 24'h123456, 0, rd, q, x, clocks, ok);
    check(ok && q && x, "write crate 1 N5 A2: Q and X");
    check(g_crate[0].dwm.busy_clks - b0 == 10, $sformatf("1 us Dataway cycle is 10 clocks of Busy (%0d)", g_crate[0].dwm.busy_clks - b0));
    op(3'd1, 5'd5, 4'd2, 5'd0, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && rd == 24'h123456 && q && x, "read back crate 1 N5 A2");
    check(clocks < 30, $sformatf("1 us operation takes %0d clocks", clocks));
    check(crr_lat == 6, $sformatf("PBB to CRR with idle ACB: %0d clocks", crr_lat));
    $display("1 us read: PBB to CRR %0d clocks, PBB to CRR release %0d clocks", crr_lat, clocks);
    if (ok && rd == 24'h123456) mech[M_HS_1US]++;
    op(3'd2, 5'd7, 4'd1, 5'd0, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && rd == 24'(6 * 16 + 1), "read crate 2 N7 A1 (station index 6)");
    check(g_crate[0].dwm.mem[4][2] == 24'h123456 && g_crate[1].dwm.mem[4][2] == 24'(4 * 16 + 2),
          "write reached only the addressed crate");

    // mode 6: 2 us cycle
    sw[0].mode = 3'd6;
    b0 = g_crate[0].dwm.busy_clks;
    op(3'd1, 5'd9, 4'd0, 5'd16, 24'h0abcde, 0, rd, q, x, clocks, ok);
    check(ok && g_crate[0].dwm.busy_clks - b0 == 20, "2 us Dataway cycle is 20 clocks of Busy");
    check(g_crate[0].dwm.mem[8][0] == 24'h0abcde, "2 us write");
    if (ok && g_crate[0].dwm.mem[8][0] == 24'h0abcde) mech[M_HS_2US]++;

    // mode 2: handshake, branch driver timing
    sw[0].mode = 3'd2;
    op(3'd1, 5'd10, 4'd3, 5'd16, 24'h00beef, 1, rd, q, x, clocks, ok);
    op(3'd1, 5'd10, 4'd3, 5'd0, 24'h0, 1, rd, q, x, clocks, ok);
    check(ok && rd == 24'h00beef && q, "branch-driver timing write/read");
    if (ok && rd == 24'h00beef) mech[M_BRANCH_TIMING]++;

    // mode 0: old SLAC branch
    sw[0].mode = 3'd0;
    repeat (5) @(negedge clk);
    old_op(3'd1, 5'd11, 4'd4, 5'd16, 24'h00cafe, rd, q);
    old_op(3'd1, 5'd11, 4'd4, 5'd0, 24'h0, rd, q);
    check(rd == 24'h00cafe && q, "old mode write/read");
    if (rd == 24'h00cafe) mech[M_OLD_MODE]++;
    sw[0].mode = 3'd4;
    repeat (5) @(negedge clk);

    // LAM system: enable EL everywhere, LAM in crate 2 only
    op(3'd7, 5'd25, 0, F_WR_CTRL, 24'h1, 0, rd, q, x, clocks, ok);
    check(fp_el == 2'b11, "EL set in both crates");
    dw_l[1] = 24'h000010;
    repeat (5) @(negedge clk);
    check(bl && lri_c == 2'b10, "crate 2 posts BL and wins LRI");
    op(3'd7, 5'd25, 0, F_RD_STATUS_LRI, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && x && rd[11:8] == 4'd2 && rd[18], "F4 to all crates returns crate 2 status");
    op(3'd2, 5'd25, 0, F_RD_LAM, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && rd == 24'h000010, "F1 returns LAM source");
    if (rd == 24'h000010) mech[M_LAM_READ]++;
    op(3'd2, 5'd25, 0, F_TEST_LSUM, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && q, "F8 Q with LAM");
    op(3'd1, 5'd25, 0, F_TEST_LSUM, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && !q && x, "F8 no Q without LAM");
    mech[M_TEST_LSUM]++;
    // crate 1 (higher priority) gets a LAM: no pre-emption
    dw_l[0] = 24'h000001;
    repeat (5) @(negedge clk);
    check(lri_c == 2'b10, "holder keeps LRI");
    // host masks crate 2: crate 1 wins the next round
    op(3'd2, 5'd25, 0, F_WR_CTRL, 24'h0, 0, rd, q, x, clocks, ok);
    repeat (3) @(negedge clk);
    check(lri_c == 2'b01, "crate 1 wins after crate 2 masked");
    op(3'd7, 5'd25, 0, F_RD_STATUS_LRI, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && rd[11:8] == 4'd1, "F4 now returns crate 1");
    if (rd[11:8] == 4'd1) mech[M_LAM_ARB]++;
    dw_l[0] = '0; dw_l[1] = '0;
    op(3'd7, 5'd25, 0, F_WR_CTRL, 24'h0, 0, rd, q, x, clocks, ok);

    // ACB request-grant: auxiliary controller holds the Dataway in crate 1
    acb_req[0] = 1; acb_busy[0] = 1;
    repeat (3) @(negedge clk);
    check(acb_gnt[0], "auxiliary controller granted");
    acb_n[0] = 5'd3; #1;
    check(dw_n[0] == 24'h000004, "encoded ACB N decoded onto N3");
    if (dw_n[0] == 24'h000004) mech[M_ACB_N]++;
    acb_n[0] = 5'd0;
    // N25 works while the auxiliary controller owns the Dataway
    op(3'd1, 5'd25, 0, F_RD_STATUS, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && x && rd[11:8] == 4'd1, "N25 read while ACB busy");
    if (ok && x) mech[M_N25_ACB_BUSY]++;
    fork
      op(3'd1, 5'd12, 4'd0, 5'd16, 24'h000777, 0, rd, q, x, clocks, ok);
      begin
        repeat (30) @(negedge clk); acb_busy[0] = 0;
        repeat (30) @(negedge clk);
        check(!crr && acb_ri[0] && !acb_acl[0], "request-grant waits for REQ release");
        acb_req[0] = 0;
      end
    join
    check(ok && clocks > 60 && g_crate[0].dwm.mem[11][0] == 24'h000777, "request-grant cycle after release");
    if (ok && clocks > 60) mech[M_RG_WAIT]++;

    // ACL arbitration each cycle: enable and set ACLRQ
    sw[0].aclrq_en = 1;
    op(3'd1, 5'd25, 0, F_WR_CTRL, 24'h4, 0, rd, q, x, clocks, ok);
    check(fp_aclrq[0], "ACLRQ flag set");
    acb_req[0] = 1; acb_busy[0] = 1; acl_clks = 0;
    fork
      op(3'd1, 5'd12, 4'd1, 5'd16, 24'h000888, 0, rd, q, x, clocks, ok);
      begin repeat (20) @(negedge clk); acb_busy[0] = 0; end
    join
    check(ok && acl_clks > 0 && acb_req[0], "ACL takes the Dataway while REQ held");
    check(g_crate[0].dwm.mem[11][1] == 24'h000888, "ACL cycle write");
    if (ok && acl_clks > 0) mech[M_ACL]++;
    acb_req[0] = 0;
    repeat (3) @(negedge clk);
    check(!acb_acl[0] && !acb_ri[0], "ACL released after the cycle");

    // block of cycles: BRQ (enabled by EBRQ), request-grant
    sw[0].ebrq = 1;
    op(3'd1, 5'd25, 0, F_WR_CTRL, 24'h2, 0, rd, q, x, clocks, ok);
    check(fp_brq[0] && !fp_aclrq[0], "BRQ flag set");
    op(3'd1, 5'd13, 4'd0, 5'd16, 24'h000001, 0, rd, q, x, clocks, ok);
    acb_req[0] = 1;
    repeat (10) @(negedge clk);
    check(acb_ri[0] && fp_acidl[0] && !acb_gnt[0], "control kept between cycles of a block");
    op(3'd1, 5'd13, 4'd0, 5'd0, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && rd == 24'h000001 && clocks < 30, "block cycle needs no new arbitration");
    if (ok && acb_ri[0]) mech[M_BLOCK]++;
    op(3'd1, 5'd25, 0, F_WR_CTRL, 24'h0, 0, rd, q, x, clocks, ok);
    repeat (3) @(negedge clk);
    check(!acb_ri[0] && acb_gnt[0], "block released when BRQ cleared");

    // forced ACL: all-crate write while the auxiliary controller keeps REQ
    acl_clks = 0;
    op(3'd7, 5'd3, 4'd0, 5'd16, 24'h00f00d, 0, rd, q, x, clocks, ok);
    check(ok && acl_clks > 0 && g_crate[0].dwm.mem[2][0] == 24'h00f00d
          && g_crate[1].dwm.mem[2][0] == 24'h00f00d, "CR7 write with forced ACL");
    if (ok && acl_clks > 0) mech[M_FORCED_ACL]++;
    acb_req[0] = 0;

    // C flag and Z flag cycles
    c0 = g_crate[0].dwm.c_cycles; z0 = g_crate[0].dwm.z_cycles; w0 = g_crate[0].dwm.writes;
    op(3'd1, 5'd25, 0, F_WR_CTRL, 24'h11, 0, rd, q, x, clocks, ok);
    repeat (20) @(negedge clk);
    check(g_crate[0].dwm.c_cycles == c0 + 1 && g_crate[0].dwm.z_cycles == z0, "C flag cycle");
    check(g_crate[0].dwm.writes == w0 && fp_el[0], "C cycle keeps flags, writes nothing");
    if (g_crate[0].dwm.c_cycles == c0 + 1) mech[M_C_FLAG]++;
    op(3'd1, 5'd25, 0, F_WR_CTRL, 24'h21, 0, rd, q, x, clocks, ok);
    repeat (20) @(negedge clk);
    check(g_crate[0].dwm.z_cycles == z0 + 1 && fp_iflag[0] && !fp_el[0], "Z flag cycle initialises");
    if (g_crate[0].dwm.z_cycles == z0 + 1) mech[M_Z_FLAG]++;

    // branch BZ to all crates
    z0 = g_crate[0].dwm.z_cycles; z1 = g_crate[1].dwm.z_cycles;
    bz = 1;
    op(3'd7, 5'd0, 0, 5'd0, 24'h0, 0, rd, q, x, clocks, ok);
    bz = 0;
    check(ok && g_crate[0].dwm.z_cycles == z0 + 1 && g_crate[1].dwm.z_cycles == z1 + 1, "branch BZ");
    if (ok && g_crate[1].dwm.z_cycles == z1 + 1) mech[M_BRANCH_Z]++;
    op(3'd7, 5'd25, 0, F_WR_CTRL, 24'h0, 0, rd, q, x, clocks, ok);

    // inhibit: BI honoured only where EBI is on
    sw[0].ebi = 1; bi = 1;
    #1;
    check(dw_i == 2'b01, "BI with EBI");
    if (dw_i == 2'b01) mech[M_INHIBIT]++;
    bi = 0;

    // OFFLINE crate: no Dataway cycle, N25 still reachable
    sw[1].offline = 1;
    b1 = g_crate[1].dwm.busy_clks;
    op(3'd2, 5'd7, 4'd1, 5'd0, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && !x && g_crate[1].dwm.busy_clks == b1, "OFFLINE: handshake without Dataway");
    op(3'd2, 5'd25, 0, F_RD_STATUS, 24'h0, 0, rd, q, x, clocks, ok);
    check(ok && x && rd[2], "OFFLINE: status readable");
    if (ok && x && rd[2]) mech[M_OFFLINE]++;
    sw[1].offline = 0;

    // Branch Disconnect: no answer at all
    sw[1].mcra = 4'd8;
    op(3'd2, 5'd25, 0, F_RD_STATUS, 24'h0, 0, rd, q, x, clocks, ok);
    check(!ok && crr_clks[1] == 0, "disconnected crate does not answer");
    if (!ok) mech[M_DISCONNECT]++;
    sw[1].mcra = 4'd2;

    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %s happened %0d times", mech_t'(i), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_t'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
