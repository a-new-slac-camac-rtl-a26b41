// ccu2: SLAC CAMAC type U crate controller with ACB interface.
//
// Joins three interfaces. The SLAC parallel branch (binary crate address,
// N, A, F, separate write/read data, direct S1/S2, common BC/BZ/BI, and the
// PBB/CRR/BT handshake lines) reaches the crate Dataway (N lines, A, F, W, R,
// Q, X, L, B, S1, S2, C, Z, I). The Auxiliary Controller Bus lets auxiliary
// controllers share the Dataway: they request it, the crate controller grants
// it, and takes it back by request-grant or lockout arbitration; their encoded
// N is decoded here and the latched LAMs are buffered to them. Rear-panel
// LRQ/LRI/LGI-LGO lines chain several crates for LAM priority arbitration.
//
// Blocks: crate_addr_decode (address), n_decoder (Dataway N and N25),
// handshake_timing (handshake and timing generator), acb_control
// (arbitration), lam_register and lam_priority (LAM system), ciz_control
// (C, Z, I), control_regs (N25 commands and registers), data_interface (data
// routing, F gating). All signals are active high and single direction; the
// real module's lines are low true and open collector. One clock, period
// TICK_NS; branch inputs other than PBB and the strobes are expected to be
// stable while PBB is high. Flags and switch settings are brought out as fp_*
// for a front panel display.
module ccu2
  import ccu2_pkg::*;
#(
  parameter int unsigned TICK_NS = 100
) (
  input  logic                 clk,
  input  logic                 rst_n,     // power-up reset
  input  ccu2_switches_t       sw,        // manual switches
  // SLAC parallel branch
  input  logic [2:0]           bcr,       // crate address, 7 = all crates
  input  logic [4:0]           bn,
  input  logic [3:0]           ba,
  input  logic [4:0]           bf,
  input  logic [23:0]          bw,        // write data
  output logic [23:0]          br,        // read data
  output logic                 bq,
  output logic                 bx,
  input  logic                 bs1,
  input  logic                 bs2,
  input  logic                 bc,
  input  logic                 bz,
  input  logic                 bi,
  input  logic                 pbb,       // Parallel Branch Busy
  output logic                 crr,       // Crate Ready
  output logic                 bt,        // Branch Timing
  output logic                 bl,        // branch LAM
  // LAM priority chain between crates
  input  logic                 lgi,
  input  logic                 lri_in,    // bussed LRI
  output logic                 lrq,
  output logic                 lgo,
  output logic                 lri_out,
  // Dataway
  output logic [N_STATIONS-1:0] dw_n,
  output logic [3:0]           dw_a,
  output logic [4:0]           dw_f,
  output logic [23:0]          dw_w,
  input  logic [23:0]          dw_r,
  input  logic                 dw_q,
  input  logic                 dw_x,
  input  logic [N_STATIONS-1:0] dw_l,
  output logic                 dw_b,
  output logic                 dw_s1,
  output logic                 dw_s2,
  output logic                 dw_c,
  output logic                 dw_z,
  output logic                 dw_i,
  // Auxiliary Controller Bus
  input  logic [4:0]           acb_n,
  output logic [N_STATIONS-1:0] acb_l,
  input  logic                 acb_req,
  input  logic                 acb_busy,
  output logic                 acb_gnt,
  output logic                 acb_ri,
  output logic                 acb_acl,
  // front panel indicators
  output logic                 fp_el,
  output logic                 fp_brq,
  output logic                 fp_aclrq,
  output logic                 fp_iflag,
  output logic                 fp_lri,
  output logic                 fp_acidl
);

  logic connected, own, all_crates, addressed, n25;
  logic global_cz, ccrq, forced_acl, acidl, int_s1, dw_cycle, br_window;
  logic local_cycle, cycle_done, local_req, sel;
  logic el, brq, aclrq, iflag, cflag, zflag, z_done, lsum, lri_own, freeze;
  logic [N_STATIONS-1:0] lam;
  logic [23:0] rdata, wr_data;
  logic rd_en, int_q, int_x, wr_stb;

  assign global_cz = (bc || bz) && all_crates;
  assign sel       = addressed && n25 && br_window && !global_cz;

  crate_addr_decode u_addr (
    .mcra(sw.mcra), .bcr, .connected, .own, .all_crates, .addressed
  );

  n_decoder #(.NSTATIONS(N_STATIONS)) u_ndec (
    .bn, .acb_n, .cc_drive(dw_cycle), .ac_drive(!acidl), .dw_n, .n25
  );

  handshake_timing #(.TICK_NS(TICK_NS)) u_hs (
    .clk, .rst_n, .mode(sw.mode), .offline(sw.offline), .addressed, .all_crates,
    .n25, .global_cz, .pbb, .bs1, .bs2, .local_req, .acidl, .ccrq, .forced_acl,
    .crr, .bt, .dw_b, .dw_s1, .dw_s2, .int_s1, .dw_cycle, .br_window,
    .local_cycle, .cycle_done
  );

  acb_control u_acb (
    .clk, .rst_n, .ccrq, .forced_acl, .brq, .aclrq, .acb_req, .acb_busy,
    .acb_gnt, .acb_ri, .acb_acl, .acidl
  );

  lam_register #(.NSTATIONS(N_STATIONS)) u_lam (
    .clk, .rst_n, .dw_l, .freeze, .lam, .lsum
  );

  lam_priority u_lpri (
    .clk, .rst_n, .lsum, .el, .elrg(sw.elrg), .connected, .lgi, .lri_in,
    .bl, .lrq, .lgo, .lri_own
  );

  ciz_control u_ciz (
    .clk, .rst_n, .bi, .bc, .bz, .ebi(sw.ebi), .connected, .all_crates,
    .wr_stb, .wr_i(wr_data[CW_I]), .wr_c(wr_data[CW_C]), .wr_z(wr_data[CW_Z]),
    .dw_b, .local_cycle, .cycle_done, .iflag, .cflag, .zflag, .local_req,
    .dw_c, .dw_z, .dw_i, .z_done
  );

  control_regs u_regs (
    .clk, .rst_n, .sw, .sel, .bf, .bw, .stb(int_s1), .lam, .lsum, .lri_own,
    .iflag, .cflag, .zflag, .acidl, .z_done, .el, .brq, .aclrq, .rdata, .rd_en,
    .q(int_q), .x(int_x), .freeze, .wr_stb, .wr_data
  );

  data_interface u_data (
    .bw, .bf, .ba, .dw_cycle, .dw_r, .dw_q, .dw_x, .int_sel(sel),
    .int_rdata(rdata), .int_rd_en(rd_en), .int_q, .int_x,
    .dw_w, .dw_f, .dw_a, .br, .bq, .bx
  );

  assign acb_l    = lam;
  assign lri_out  = lri_own;
  assign fp_el    = el;
  assign fp_brq   = brq;
  assign fp_aclrq = aclrq;
  assign fp_iflag = iflag;
  assign fp_lri   = lri_own;
  assign fp_acidl = acidl;

endmodule
