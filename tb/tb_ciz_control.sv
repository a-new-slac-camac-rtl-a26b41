// tb_ciz_control: power-up Z cycle, C and Z flag cycles, branch BC/BZ with
// and without the all-crates address, and the BI/EBI/I-flag inhibit rules.
// The Busy and local-cycle signals of the handshake block are driven here.
module tb_ciz_control;
  logic clk = 0, rst_n;
  logic bi, bc, bz, ebi, connected, all_crates, wr_stb, wr_i, wr_c, wr_z;
  logic dw_b, local_cycle, cycle_done;
  logic iflag, cflag, zflag, local_req, dw_c, dw_z, dw_i, z_done;
  int checks = 0, failures = 0, z_pulses = 0, c_seen = 0, z_seen = 0;

  ciz_control dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (z_done) z_pulses++;
    if (dw_c) c_seen++;
    if (dw_z) z_seen++;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: i=%b c=%b z=%b req=%b dw_c=%b dw_z=%b dw_i=%b",
               msg, iflag, cflag, zflag, local_req, dw_c, dw_z, dw_i);
    end
  endtask

  // one Dataway cycle of 10 clocks, local or branch
  task automatic run_cycle(input logic local_c);
    @(negedge clk); local_cycle = local_c;
    @(negedge clk); dw_b = 1;
    repeat (10) @(negedge clk);
    dw_b = 0; cycle_done = 1;
    @(negedge clk); cycle_done = 0; local_cycle = 0;
    repeat (2) @(negedge clk);
    #1;
  endtask

  task automatic write_cw(input logic i, input logic c, input logic z);
    @(negedge clk); wr_stb = 1; wr_i = i; wr_c = c; wr_z = z;
    @(negedge clk); wr_stb = 0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; {bi, bc, bz, ebi, wr_stb, wr_i, wr_c, wr_z, dw_b, local_cycle, cycle_done} = '0;
    connected = 1; all_crates = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    z_pulses = 0; c_seen = 0; z_seen = 0;
    check(zflag && local_req && !iflag, "power-up requests Z cycle");
    run_cycle(1);
    check(z_seen == 10 && c_seen == 0, "power-up cycle carries Z only");
    check(!zflag && !local_req, "Z flag cleared at end of cycle");
    check(iflag && dw_i, "Z cycle sets I flag");
    check(z_pulses == 1, $sformatf("one z_done pulse (%0d)", z_pulses));
    write_cw(0, 0, 0);
    check(!iflag && !dw_i, "I flag cleared by control word");
    // branch BI and its enable
    bi = 1; #1;
    check(!dw_i, "BI ignored with EBI off");
    ebi = 1; #1;
    check(dw_i, "BI drives I with EBI on");
    connected = 0; #1;
    check(!dw_i, "BI ignored when disconnected");
    connected = 1; bi = 0; ebi = 0;
    write_cw(1, 0, 0); #1;
    check(iflag && dw_i, "I flag asserts Dataway I");
    write_cw(0, 0, 0);
    // C flag cycle
    c_seen = 0; z_seen = 0;
    write_cw(0, 1, 0);
    check(cflag && local_req, "C flag requests cycle");
    run_cycle(1);
    check(c_seen == 10 && z_seen == 0 && !cflag && !iflag, "C flag cycle");
    // branch BC not addressed to all crates: no effect
    c_seen = 0; bc = 1; all_crates = 0;
    run_cycle(0);
    check(c_seen == 0, "BC needs CR7");
    all_crates = 1;
    run_cycle(0);
    check(c_seen == 10, "BC with CR7 gives Dataway C");
    bc = 0;
    // branch BZ with CR7
    z_seen = 0; bz = 1;
    run_cycle(0);
    bz = 0; all_crates = 0;
    check(z_seen == 10 && iflag && z_pulses == 2, "BZ with CR7 initialises and sets I");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
