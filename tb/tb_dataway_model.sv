// tb_dataway_model: behavioural model of a crate's Dataway with plug-in
// modules at every station. Each station N1..N24 holds sixteen 24-bit
// registers, one per subaddress: F0 reads one, F16 writes one at S1, and
// both answer Q=1, X=1. Other function codes give X=0. It counts the
// Dataway cycles (Busy rising edges) and the Busy clocks, and the C and Z
// cycles it sees.
module tb_dataway_model (
  input  logic        clk,
  input  logic [23:0] dw_n,
  input  logic [3:0]  dw_a,
  input  logic [4:0]  dw_f,
  input  logic [23:0] dw_w,
  input  logic        dw_b,
  input  logic        dw_s1,
  input  logic        dw_c,
  input  logic        dw_z,
  output logic [23:0] dw_r,
  output logic        dw_q,
  output logic        dw_x
);
  logic [23:0] mem [24][16];
  logic s1_q = 0, b_q = 0, c_q = 0, z_q = 0;
  int cycles = 0, busy_clks = 0, c_cycles = 0, z_cycles = 0, writes = 0;

  initial for (int n = 0; n < 24; n++) for (int a = 0; a < 16; a++) mem[n][a] = 24'(n * 16 + a);

  always_comb begin
    dw_r = '0; dw_q = 0; dw_x = 0;
    for (int n = 0; n < 24; n++)
      if (dw_n[n]) begin
        if (dw_f == 5'd0)  begin dw_r = mem[n][dw_a]; dw_q = 1; dw_x = 1; end
        if (dw_f == 5'd16) begin dw_q = 1; dw_x = 1; end
      end
  end

  always @(posedge clk) begin
    s1_q <= dw_s1; b_q <= dw_b; c_q <= dw_c; z_q <= dw_z;
    if (dw_b) busy_clks++;
    if (dw_b && !b_q) cycles++;
    if (dw_c && !c_q) c_cycles++;
    if (dw_z && !z_q) z_cycles++;
    if (dw_s1 && !s1_q && dw_f == 5'd16)
      for (int n = 0; n < 24; n++)
        if (dw_n[n]) begin mem[n][dw_a] <= dw_w; writes++; end
  end
endmodule
