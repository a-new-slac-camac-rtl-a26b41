// tb_acb_control: drives the ACB arbitration block through its four program
// modes and the forced-ACL case, with a simple auxiliary controller model
// (REQ held while it owns the Dataway, busy during its Dataway cycles).
// Checks RI, ACL, grant and ACIDL after each step.
module tb_acb_control;
  logic clk = 0, rst_n;
  logic ccrq, forced_acl, brq, aclrq, acb_req, acb_busy;
  logic acb_gnt, acb_ri, acb_acl, acidl;
  int checks = 0, failures = 0;

  acb_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: gnt=%b ri=%b acl=%b acidl=%b", msg, acb_gnt, acb_ri, acb_acl, acidl);
    end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ccrq = 0; forced_acl = 0; brq = 0; aclrq = 0; acb_req = 0; acb_busy = 0;
    clocks(2); rst_n = 1; clocks(1);
    // idle: auxiliary controller gets the grant
    acb_req = 1; acb_busy = 1; #1;
    check(acb_gnt && !acb_ri && !acb_acl && !acidl, "idle grant");
    // request-grant, each cycle
    ccrq = 1; clocks(3);
    check(acb_ri && !acb_acl, "RG: RI, no ACL");
    check(acb_gnt && !acidl, "RG: holder keeps grant");
    acb_busy = 0; clocks(3);
    check(!acidl, "RG: waits for REQ release, not only end of cycle");
    acb_req = 0; clocks(2);
    check(acidl && !acb_gnt, "RG: ACIDL after REQ release");
    ccrq = 0; clocks(2);
    check(!acidl && !acb_ri, "RG: released after cycle");
    // ACL, each cycle
    aclrq = 1; acb_req = 1; acb_busy = 1; clocks(1);
    ccrq = 1; clocks(2);
    check(acb_acl && acb_ri && !acb_gnt, "ACL: lockout asserted, grant removed");
    check(!acidl, "ACL: waits for current cycle");
    acb_busy = 0; clocks(2);
    check(acidl, "ACL: ACIDL at end of auxiliary cycle although REQ held");
    ccrq = 0; clocks(2);
    check(!acidl && !acb_acl && acb_gnt, "ACL: released, grant back");
    // request-grant, block of cycles
    aclrq = 0; brq = 1; acb_req = 0; acb_busy = 0;
    ccrq = 1; clocks(2);
    check(acidl && !acb_acl, "RG block: control gained");
    ccrq = 0; acb_req = 1; clocks(3);
    check(acidl && acb_ri && !acb_gnt, "RG block: control kept between cycles");
    ccrq = 1; #1;
    check(acidl, "RG block: next cycle at once");
    clocks(1); ccrq = 0; brq = 0; clocks(2);
    check(!acidl && !acb_ri && acb_gnt, "RG block: released when BRQ cleared");
    // ACL, block of cycles
    brq = 1; aclrq = 1; acb_busy = 1;
    ccrq = 1; clocks(2);
    check(!acidl && acb_acl, "ACL block: lockout");
    acb_busy = 0; clocks(2);
    check(acidl, "ACL block: gained");
    ccrq = 0; clocks(3);
    check(acidl && acb_acl, "ACL block: lockout held between cycles");
    brq = 0; clocks(2);
    check(!acidl && !acb_acl, "ACL block: released");
    // forced ACL with flags clear, BRQ set: no block hold
    aclrq = 0; brq = 1; acb_req = 1; acb_busy = 0; clocks(1);
    ccrq = 1; forced_acl = 1; clocks(2);
    check(acb_acl && acidl, "forced ACL overrides request-grant");
    ccrq = 0; forced_acl = 0; clocks(2);
    check(!acidl && !acb_acl, "forced cycle not held as block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
