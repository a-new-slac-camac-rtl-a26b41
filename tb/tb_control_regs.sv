// tb_control_regs: exercises each N25 command (F0, F1, F4, F8, F16 and an
// unknown code), the switch enables of BRQ and ACLRQ, and the clearing of
// the flags by a Z cycle. The expected status word is assembled here from
// the documented bit layout, independently of the block.
module tb_control_regs
  import ccu2_pkg::*;
;
  logic clk = 0, rst_n;
  ccu2_switches_t sw;
  logic sel, stb, lsum, lri_own, iflag, cflag, zflag, acidl, z_done;
  logic [4:0] bf;
  logic [23:0] bw, lam, rdata, wr_data;
  logic el, brq, aclrq, rd_en, q, x, freeze, wr_stb;
  int checks = 0, failures = 0, wr_count = 0;

  control_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (wr_stb) wr_count++;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: rdata=%h rd_en=%b q=%b x=%b el=%b brq=%b aclrq=%b",
               msg, rdata, rd_en, q, x, el, brq, aclrq);
    end
  endtask

  function automatic logic [23:0] exp_status();
    logic [23:0] s = '0;
    s[0] = sw.ebi; s[1] = sw.ebrq; s[2] = sw.offline; s[3] = sw.aclrq_en;
    s[4] = sw.elrg; s[7:5] = sw.mode; s[11:8] = sw.mcra;
    s[12] = el; s[13] = brq; s[14] = aclrq; s[15] = iflag; s[16] = cflag;
    s[17] = zflag; s[18] = lri_own; s[19] = lsum; s[20] = acidl;
    return s;
  endfunction

  task automatic write_cw(input logic [23:0] d);
    @(negedge clk); sel = 1; bf = 5'd16; bw = d;
    repeat (2) @(negedge clk); stb = 1;
    repeat (3) @(negedge clk); stb = 0;
    @(negedge clk); sel = 0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; sel = 0; stb = 0; bf = 0; bw = 0; lam = 24'h00a005; lsum = 1;
    lri_own = 0; iflag = 1; cflag = 0; zflag = 1; acidl = 1; z_done = 0;
    sw = '{mcra: 4'd3, mode: 3'd5, elrg: 1'b1, aclrq_en: 1'b1, offline: 1'b0,
           ebrq: 1'b0, ebi: 1'b1};
    repeat (2) @(posedge clk); rst_n = 1;
    // F0 read status
    @(negedge clk); sel = 1; bf = 5'd0; #1;
    check(rd_en && x && q && rdata == exp_status(), "F0 status word");
    check(rdata[11:8] == 4'd3, "status carries crate address");
    // F1 read LAM, latch frozen
    bf = 5'd1; #1;
    check(rd_en && x && rdata == 24'h00a005 && freeze, "F1 LAM word");
    // F4 only with LRI
    bf = 5'd4; #1;
    check(!rd_en && !x, "F4 silent without LRI");
    lri_own = 1; #1;
    check(rd_en && x && rdata == exp_status() && rdata[18], "F4 answers with LRI");
    // F8 test LAM sum
    bf = 5'd8; #1;
    check(x && q && !rd_en, "F8 Q with LAM");
    lsum = 0; #1;
    check(x && !q, "F8 no Q without LAM");
    // unknown function
    bf = 5'd2; #1;
    check(!x && !rd_en, "unknown F: no X");
    sel = 0; bf = 5'd0; #1;
    check(!x && !rd_en, "not selected: silent");
    // F16: EL and ACLRQ set, BRQ refused (EBRQ off)
    write_cw(24'b000_111);
    check(el && aclrq && !brq, "F16 flags with EBRQ off");
    check(wr_count == 1, "one write strobe per S1");
    check(wr_data == 24'b000_111, "control word passed on");
    // enable BRQ, write again
    sw.ebrq = 1'b1;
    write_cw(24'b000_010);
    check(!el && brq && !aclrq, "F16 BRQ with EBRQ on");
    // disabling the switch disables the flag
    sw.ebrq = 1'b0; #1;
    check(!brq, "BRQ follows its enable switch");
    sw.ebrq = 1'b1;
    write_cw(24'b000_111);
    // Z cycle resets EL, BRQ, ACLRQ
    @(negedge clk); z_done = 1; @(negedge clk); z_done = 0; #1;
    check(!el && !brq && !aclrq, "Z clears flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
