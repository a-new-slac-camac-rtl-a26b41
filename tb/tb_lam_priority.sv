// tb_lam_priority: three crates chained in priority order (crate 0 highest,
// its LGI held active, LRI bussed as a wired OR). Checks BL masking by EL,
// the ELRG enable, that only one crate holds LRI, that a holder is not
// pre-empted by a higher crate, and that clearing EL starts a new round.
module tb_lam_priority;
  logic clk = 0, rst_n;
  logic [2:0] lsum, el, elrg, connected, bl, lrq, lgo, lri_own, lgi;
  logic lri_bus;
  int checks = 0, failures = 0;

  assign lri_bus = |lri_own;
  assign lgi = {lgo[1], lgo[0], 1'b1};

  for (genvar i = 0; i < 3; i++) begin : g_crate
    lam_priority dut (
      .clk, .rst_n, .lsum(lsum[i]), .el(el[i]), .elrg(elrg[i]),
      .connected(connected[i]), .lgi(lgi[i]), .lri_in(lri_bus),
      .bl(bl[i]), .lrq(lrq[i]), .lgo(lgo[i]), .lri_own(lri_own[i])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: lri=%b bl=%b lrq=%b lgo=%b", msg, lri_own, bl, lrq, lgo);
    end
  endtask

  task automatic settle();
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; lsum = 0; el = 0; elrg = 3'b111; connected = 3'b111;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // LAM without EL: nothing on the branch
    lsum = 3'b100; settle();
    check(bl == 0 && lri_own == 0, "EL masks LAM sum");
    // crate 2 alone requests and wins
    el = 3'b111; settle();
    check(bl == 3'b100, "BL from crate 2");
    check(lri_own == 3'b100, "crate 2 wins alone");
    // crate 0 gets a LAM: blocks grant but may not pre-empt
    lsum = 3'b101; settle();
    check(lri_own == 3'b100, "holder not pre-empted");
    check(lgo[0] == 0, "requesting crate 0 blocks grant");
    // host clears EL of crate 2: crate 0 wins the new round
    el = 3'b011; settle();
    check(lri_own == 3'b001, "crate 0 wins after crate 2 masked");
    check(bl == 3'b001, "BL follows EL");
    // crate 0 masked, crates 1 and 2 request: crate 1 has priority
    el = 3'b110; lsum = 3'b110; settle();
    check(lri_own == 3'b010, "crate 1 beats crate 2");
    // ELRG off at crate 1: it still shows BL but hands the grant on
    elrg = 3'b101; settle();
    check(lrq[1] == 0 && lgo[1] == lgi[1], "ELRG off passes grant");
    check(lri_own == 3'b100, "crate 2 wins with crate 1 not participating");
    check(bl[1] == 1, "BL still from non-participating crate");
    // disconnected crate shows nothing
    connected = 3'b011; settle();
    check(bl[2] == 0 && lri_own == 0, "disconnected crate silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
