// tb_data_interface: random check of the branch/Dataway data routing and the
// F/A gating against a reference model of the routing rules.
module tb_data_interface;
  logic [23:0] bw, dw_r, int_rdata, dw_w, br;
  logic [4:0]  bf, dw_f;
  logic [3:0]  ba, dw_a;
  logic dw_cycle, dw_q, dw_x, int_sel, int_rd_en, int_q, int_x, bq, bx;
  int checks = 0, failures = 0;

  data_interface dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] e_w, e_br;
      logic e_q, e_x;
      bw = 24'($urandom); dw_r = 24'($urandom); int_rdata = 24'($urandom);
      bf = 5'($urandom); ba = 4'($urandom);
      {dw_cycle, dw_q, dw_x, int_sel, int_rd_en, int_q, int_x} = 7'($urandom);
      #1;
      e_w  = (dw_cycle && bf >= 16 && bf < 24) ? bw : 24'd0;
      e_br = int_rd_en ? int_rdata : ((dw_cycle && bf < 8) ? dw_r : 24'd0);
      e_q  = int_sel ? int_q : (dw_cycle & dw_q);
      e_x  = int_sel ? int_x : (dw_cycle & dw_x);
      checks++;
      if (dw_w !== e_w || br !== e_br || bq !== e_q || bx !== e_x
          || dw_f !== (dw_cycle ? bf : 5'd0) || dw_a !== (dw_cycle ? ba : 4'd0)) begin
        failures++;
        $display("FAIL i=%0d bf=%0d cyc=%b w=%h br=%h", i, bf, dw_cycle, dw_w, br);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
