// tb_n_decoder: exhaustive check of the Dataway N decoder: every branch and
// ACB code with every combination of the two source selects; the expected
// N line is computed as a shifted one-hot value.
module tb_n_decoder;
  logic [4:0]  bn, acb_n;
  logic        cc_drive, ac_drive;
  logic [23:0] dw_n;
  logic        n25;
  int checks = 0, failures = 0;

  n_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 32; b++)
        for (int a = 0; a < 32; a += 3) begin
          int src;
          logic [23:0] exp_n;
          cc_drive = s[0];
          ac_drive = s[1];
          bn = 5'(b);
          acb_n = 5'(a);
          #1;
          src = s[0] ? b : (s[1] ? a : 0);
          exp_n = (src >= 1 && src <= 24) ? (24'd1 << (src - 1)) : 24'd0;
          checks++;
          if (dw_n !== exp_n || n25 !== (b == 25)) begin
            failures++;
            $display("FAIL s=%0d bn=%0d acb_n=%0d dw_n=%h n25=%b", s, b, a, dw_n, n25);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
