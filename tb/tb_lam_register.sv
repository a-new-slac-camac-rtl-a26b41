// tb_lam_register: random L patterns with random freeze periods; checks the
// one-clock latch latency, the hold during freeze and the OR sum.
module tb_lam_register;
  logic clk = 0, rst_n;
  logic [23:0] dw_l, lam;
  logic freeze, lsum;
  logic [23:0] model;
  int checks = 0, failures = 0;

  lam_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; dw_l = '0; freeze = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      dw_l   = (i % 7 == 0) ? 24'd0 : 24'($urandom);
      freeze = ($urandom % 4) == 0;
      if (!freeze) model = dw_l;
      @(posedge clk); #1;
      checks++;
      if (lam !== model || lsum !== (model != 0)) begin
        failures++;
        $display("FAIL i=%0d lam=%h exp=%h", i, lam, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
