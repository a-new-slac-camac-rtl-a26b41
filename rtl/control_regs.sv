// control_regs: N25 command decoder, control word and status word (CCU2).
//
// The crate controller answers as station N25 on an internal bus, reachable
// from the branch without Dataway control:
//   F0  read status word            F1  read LAM data word
//   F4  read status word, only the crate holding LRI answers
//   F8  test LAM sum (Q = LAM sum)  F16 write control word
// The control word carries the EL, BRQ and ACLRQ flags kept here and the I, C
// and Z flag bits passed to ciz_control. BRQ and ACLRQ take effect only when
// their enable switches (EBRQ, ACLRQ enable) are on. A Z cycle (z_done) clears
// EL, BRQ and ACLRQ. The status word holds all switch settings, the flags, LRI
// and the LAM sum (layout in ccu2_pkg). The command set follows the CCU2
// description; the word layouts, Q/X rules and ignoring subaddress A are this
// design's choices. The control word is written one clock after the rising
// edge of the internal S1 strobe; read data is combinational.
module control_regs
  import ccu2_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  ccu2_switches_t       sw,      // manual switches
  input  logic                 sel,     // N25 command in progress for this crate
  input  logic [4:0]           bf,      // branch function code
  input  logic [23:0]          bw,      // branch write data
  input  logic                 stb,     // internal S1 strobe
  input  logic [N_STATIONS-1:0] lam,     // latched LAMs
  input  logic                 lsum,    // LAM sum
  input  logic                 lri_own, // crate holds LRI
  input  logic                 iflag,
  input  logic                 cflag,
  input  logic                 zflag,
  input  logic                 acidl,
  input  logic                 z_done,  // Z cycle ended
  output logic                 el,      // EL flag
  output logic                 brq,     // BRQ flag, enabled
  output logic                 aclrq,   // ACLRQ flag, enabled
  output logic [23:0]          rdata,   // internal read bus
  output logic                 rd_en,   // internal data goes to the branch
  output logic                 q,       // Q response
  output logic                 x,       // X response
  output logic                 freeze,  // LAM read in progress
  output logic                 wr_stb,  // control word written
  output logic [23:0]          wr_data  // control word value
);

  logic stb_q, brq_q, aclrq_q;
  logic known;
  logic [23:0] status;

  always_comb begin
    brq                         = brq_q && sw.ebrq;
    aclrq                       = aclrq_q && sw.aclrq_en;
    status                      = '0;
    status[ST_SW_LSB +: $bits(ccu2_switches_t)] = sw;
    status[ST_EL]               = el;
    status[ST_BRQ]              = brq;
    status[ST_ACLRQ]            = aclrq;
    status[ST_I]                = iflag;
    status[ST_C]                = cflag;
    status[ST_Z]                = zflag;
    status[ST_LRI]              = lri_own;
    status[ST_LSUM]             = lsum;
    status[ST_ACIDL]            = acidl;

    known   = (bf == F_RD_STATUS) || (bf == F_RD_LAM) || (bf == F_TEST_LSUM)
           || (bf == F_WR_CTRL) || (bf == F_RD_STATUS_LRI && lri_own);
    x       = sel && known;
    q       = x && ((bf == F_TEST_LSUM) ? lsum : 1'b1);
    rd_en   = sel && ((bf == F_RD_STATUS) || (bf == F_RD_LAM)
                      || (bf == F_RD_STATUS_LRI && lri_own));
    rdata   = (bf == F_RD_LAM) ? 24'(lam) : status;
    freeze  = sel && (bf == F_RD_LAM);
    wr_stb  = sel && (bf == F_WR_CTRL) && stb && !stb_q;
    wr_data = bw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stb_q   <= 1'b0;
      el      <= 1'b0;
      brq_q   <= 1'b0;
      aclrq_q <= 1'b0;
    end else begin
      stb_q <= stb;
      if (z_done) begin
        el      <= 1'b0;
        brq_q   <= 1'b0;
        aclrq_q <= 1'b0;
      end else if (wr_stb) begin
        el      <= bw[CW_EL];
        brq_q   <= bw[CW_BRQ]   && sw.ebrq;
        aclrq_q <= bw[CW_ACLRQ] && sw.aclrq_en;
      end
    end
  end

endmodule
