// tb_crate_addr_decode: exhaustive check of the crate address decoder over
// every MCRA switch setting and every branch crate address, against a
// reference written from the switch table (0..6 address, 7 all crates,
// 8 and above disconnected).
module tb_crate_addr_decode;
  logic [3:0] mcra;
  logic [2:0] bcr;
  logic connected, own, all_crates, addressed;
  int checks = 0, failures = 0;

  crate_addr_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++) begin
      for (int c = 0; c < 8; c++) begin
        logic e_con, e_own, e_all;
        mcra = 4'(m);
        bcr  = 3'(c);
        #1;
        e_con = (m < 8);
        e_own = (m < 7) && (c == m);
        e_all = (m < 8) && (c == 7);
        checks++;
        if (connected !== e_con || own !== e_own || all_crates !== e_all
            || addressed !== (e_own || e_all)) begin
          failures++;
          $display("FAIL mcra=%0d bcr=%0d got con=%b own=%b all=%b adr=%b", m, c,
                   connected, own, all_crates, addressed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
