// handshake_timing: branch handshake control and Dataway timing generator (CCU2).
//
// This is the state machine that a field programmable logic sequencer holds on
// the real module. The mode switch selects one of eight behaviours:
//   0/1  old SLAC branch: no handshake; branch S1/S2 pass straight to the
//        Dataway while the crate is addressed
//   2/3  PBB-CRR handshake, strobes supplied by the branch driver
//   4/5  PBB-CRR handshake, internal 1 us timing cycle
//   6/7  PBB-CRR handshake, internal 2 us timing cycle
// Odd settings are "Last Crate": only such a crate returns CRR and BT for
// operations to all crates (CR7, which includes the global C and Z commands).
//
// Handshake: PBB (synchronised, two flops) from the branch driver, with this
// crate addressed, raises CCRQ to the ACB logic. When ACIDL reports that the
// crate controller owns the Dataway, CRR goes to the branch and the cycle runs:
// the internal generator drives Dataway B for the whole cycle, S1 and S2 at
// fixed offsets, and BT from the start of the cycle to the end of S1 (data
// time for the branch driver). CRR is held until the driver drops PBB.
// Commands to N25 and commands to an OFFLINE crate complete the handshake
// without arbitration and without Dataway strobes; their S1 only reaches the
// internal registers (int_s1). A pending C/Z flag (local_req) runs a local
// cycle: forced ACL, then one internal timing cycle with C/Z, no CRR.
//
// Timing: TICK_NS is the clock period; the 1 us cycle has B for 1000 ns, S1 at
// 400-600 ns, S2 at 700-900 ns; the 2 us cycle doubles every edge. C/Z cycles
// carry no S1. The modes, CCRQ/ACIDL, CRR, BT and Last Crate follow the CCU2
// description; the strobe offsets, the four-phase CRR release, the N25 and
// OFFLINE handling, and the use of ACB control in modes 0/1 (held
// permanently) are this design's choices.
module handshake_timing
  import ccu2_pkg::*;
#(
  parameter int unsigned TICK_NS = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] mode,        // internal mode switch
  input  logic       offline,     // Dataway offline switch
  input  logic       addressed,   // crate addressed (own or CR7)
  input  logic       all_crates,  // operation to all crates
  input  logic       n25,         // command to the crate controller itself
  input  logic       global_cz,   // branch BC or BZ present
  input  logic       pbb,         // Parallel Branch Busy
  input  logic       bs1,         // branch strobe S1
  input  logic       bs2,         // branch strobe S2
  input  logic       local_req,   // C/Z flag cycle wanted
  input  logic       acidl,       // Dataway control gained
  output logic       ccrq,        // crate controller request to ACB logic
  output logic       forced_acl,  // force ACL arbitration
  output logic       crr,         // Crate Ready
  output logic       bt,          // Branch Timing
  output logic       dw_b,        // Dataway Busy
  output logic       dw_s1,       // Dataway S1
  output logic       dw_s2,       // Dataway S2
  output logic       int_s1,      // S1 for the internal registers
  output logic       dw_cycle,    // crate controller drives N, A, F, W
  output logic       br_window,   // branch cycle in progress (responses valid)
  output logic       local_cycle, // local C/Z cycle in progress
  output logic       cycle_done   // one-clock pulse at the end of a cycle
);

  localparam int unsigned S1_ON  = T_S1_ON  / TICK_NS;
  localparam int unsigned S1_OFF = T_S1_OFF / TICK_NS;
  localparam int unsigned S2_ON  = T_S2_ON  / TICK_NS;
  localparam int unsigned S2_OFF = T_S2_OFF / TICK_NS;
  localparam int unsigned CYC    = T_CYCLE  / TICK_NS;

  typedef enum logic [2:0] {H_IDLE, H_ARB, H_RUN, H_HOLD, H_LARB, H_LRUN} hstate_t;

  hstate_t     state;
  logic [1:0]  pbb_sync;
  logic        pbb_s;
  logic [15:0] cnt;
  logic        t2;       // current cycle is a 2 us cycle
  logic        op_dw;    // current branch operation uses the Dataway
  logic        op_all;   // current branch operation addressed to all crates
  logic        op_cz;    // current branch operation is a C/Z command

  logic hs, int_t, last, crr_drive, run_int, gen_s1, gen_s2, gen_bt, gen_end;
  logic old_sel, start_dw;

  assign pbb_s = pbb_sync[1];

  always_comb begin
    hs        = mode_handshake(mode);
    int_t     = mode_int_timing(mode);
    last      = mode_last_crate(mode);
    start_dw  = !offline && (global_cz || !n25);
    gen_s1    = t2 ? (cnt >= 16'(2*S1_ON) && cnt < 16'(2*S1_OFF)) : (cnt >= 16'(S1_ON) && cnt < 16'(S1_OFF));
    gen_s2    = t2 ? (cnt >= 16'(2*S2_ON) && cnt < 16'(2*S2_OFF)) : (cnt >= 16'(S2_ON) && cnt < 16'(S2_OFF));
    gen_bt    = t2 ? (cnt < 16'(2*S1_OFF)) : (cnt < 16'(S1_OFF));
    gen_end   = t2 ? (cnt == 16'(2*CYC - 1)) : (cnt == 16'(CYC - 1));
    run_int   = (state == H_RUN) && int_t;
    crr_drive = !op_all || last;
    // old SLAC branch mode: transparent strobes while addressed and owning the Dataway
    old_sel   = !hs && addressed && start_dw && acidl && (state == H_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pbb_sync   <= '0;
      state      <= H_IDLE;
      cnt        <= '0;
      t2         <= 1'b0;
      op_dw      <= 1'b0;
      op_all     <= 1'b0;
      op_cz      <= 1'b0;
      cycle_done <= 1'b0;
    end else begin
      pbb_sync   <= {pbb_sync[0], pbb};
      cycle_done <= 1'b0;
      unique case (state)
        H_IDLE: begin
          cnt <= '0;
          t2  <= mode_two_us(mode);
          if (hs && pbb_s && addressed) begin
            op_dw  <= start_dw;
            op_all <= all_crates;
            op_cz  <= global_cz;
            state  <= start_dw ? H_ARB : H_RUN;
          end else if (local_req) begin
            op_dw  <= 1'b0;
            op_all <= 1'b0;
            op_cz  <= 1'b0;
            state  <= H_LARB;
          end
        end
        H_ARB: begin
          if (!pbb_s)     state <= H_IDLE;   // branch driver gave up
          else if (acidl) state <= H_RUN;
        end
        H_RUN: begin
          if (int_t) begin
            cnt <= cnt + 16'd1;
            if (gen_end) state <= H_HOLD;
          end else if (!pbb_s) begin
            state      <= H_IDLE;
            cycle_done <= 1'b1;
          end
        end
        H_HOLD: if (!pbb_s) begin
          state      <= H_IDLE;
          cycle_done <= 1'b1;
        end
        H_LARB: if (acidl) state <= H_LRUN;
        H_LRUN: begin
          cnt <= cnt + 16'd1;
          if (gen_end) begin
            state      <= H_IDLE;
            cycle_done <= 1'b1;
          end
        end
        default: state <= H_IDLE;
      endcase
    end
  end

  always_comb begin
    local_cycle = (state == H_LARB) || (state == H_LRUN);
    ccrq        = ((state == H_ARB || state == H_RUN) && op_dw)
               || local_cycle
               || (!hs && !offline);
    forced_acl  = ((state == H_ARB || state == H_RUN) && op_dw && op_all) || local_cycle;
    crr         = (state == H_RUN || state == H_HOLD) && crr_drive;
    bt          = run_int && gen_bt && crr_drive;
    dw_b        = ((state == H_RUN) && op_dw)
               || (state == H_LRUN)
               || (old_sel && (bs1 || bs2));
    dw_s1       = ((state == H_RUN) && op_dw && !op_cz && (int_t ? gen_s1 : bs1))
               || (old_sel && !global_cz && bs1);
    dw_s2       = ((state == H_RUN) && op_dw && (int_t ? gen_s2 : bs2))
               || ((state == H_LRUN) && gen_s2)
               || (old_sel && bs2);
    int_s1      = ((state == H_RUN) && (int_t ? gen_s1 : bs1))
               || (!hs && addressed && bs1);
    dw_cycle    = ((state == H_RUN) && op_dw) || old_sel;
    br_window   = (state == H_RUN) || (state == H_HOLD) || (!hs && addressed);
  end

  // Handshake rules: the Dataway is only driven while the ACB logic has
  // granted it, BT only comes with CRR, and CRR for a Dataway operation is
  // only given once control has been gained.
  a_busy_owned: assert property (@(posedge clk) disable iff (!rst_n) dw_b |-> acidl);
  a_bt_with_crr: assert property (@(posedge clk) disable iff (!rst_n) bt |-> crr);
  a_crr_owned: assert property (@(posedge clk) disable iff (!rst_n)
                                (crr && op_dw && state == H_RUN) |-> acidl);

endmodule
