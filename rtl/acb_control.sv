// acb_control: Auxiliary Controller Bus arbitration of the CCU2.
//
// The branch reaches the Dataway through ACB arbitration. Two program flags
// choose the mode: ACLRQ selects Auxiliary Controller Lockout (ACL) instead of
// plain request-grant, and BRQ keeps Dataway control for a block of cycles
// instead of giving it back after each one. Cycles to all crates and C/Z
// cycles force ACL whatever the flags say.
//
// On a crate controller request (ccrq) the block asserts Request Inhibit (RI),
// and ACL in ACL mode, then waits until the auxiliary controllers are idle:
// in request-grant mode the controller holding the grant must drop REQ; with
// ACL only its current Dataway cycle (acb_busy) must end. It then returns
// ACIDL and keeps control while ccrq is high, or, with BRQ set (and the cycle
// not forced), until BRQ is cleared. While idle the grant goes to the
// auxiliary controllers whenever they request. The modes follow the CCU2
// description; the reduced ACB (one REQ, one grant, RI, ACL, busy) is this
// design's model of the standard bus. ACIDL rises one clock after the idle
// condition is seen.
module acb_control (
  input  logic clk,
  input  logic rst_n,
  input  logic ccrq,       // request from the handshake logic
  input  logic forced_acl, // force ACL arbitration
  input  logic brq,        // hold control for a block of cycles (enabled flag)
  input  logic aclrq,      // use ACL arbitration (enabled flag)
  input  logic acb_req,    // REQ from auxiliary controllers
  input  logic acb_busy,   // an auxiliary controller is in a Dataway cycle
  output logic acb_gnt,    // grant to the auxiliary controller chain
  output logic acb_ri,     // Request Inhibit
  output logic acb_acl,    // Auxiliary Controller Lockout
  output logic acidl       // crate controller owns the Dataway
);

  typedef enum logic [1:0] {S_IDLE, S_ARB, S_OWN} state_t;

  state_t state;
  logic   use_acl;   // ACL arbitration for the current request
  logic   hold_blk;  // block mode for the current request

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      use_acl  <= 1'b0;
      hold_blk <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (ccrq) begin
          state    <= S_ARB;
          use_acl  <= aclrq || forced_acl;
          hold_blk <= brq && !forced_acl;
        end
        S_ARB: begin
          if (forced_acl) use_acl <= 1'b1;
          if (!ccrq && !hold_blk)
            state <= S_IDLE;
          else if (!acb_busy && (use_acl || forced_acl || !acb_req))
            state <= S_OWN;
        end
        S_OWN: begin
          if (ccrq) begin
            if (forced_acl) use_acl <= 1'b1;
          end else if (!(hold_blk && brq)) begin
            state <= S_IDLE;
          end else begin
            // between cycles of a block: follow the flags as they are now
            use_acl <= aclrq;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    acb_ri  = (state != S_IDLE);
    acb_acl = (state != S_IDLE) && (use_acl || forced_acl);
    acidl   = (state == S_OWN);
    // the controller holding the grant keeps it through request-grant arbitration
    acb_gnt = acb_req && ((state == S_IDLE) || (state == S_ARB && !acb_acl));
  end

  // ACB rules: lockout always comes with Request Inhibit, the grant is never
  // given while the crate controller owns the Dataway, and no auxiliary
  // controller runs a Dataway cycle then.
  a_acl_ri: assert property (@(posedge clk) disable iff (!rst_n) acb_acl |-> acb_ri);
  a_no_grant_owned: assert property (@(posedge clk) disable iff (!rst_n) acidl |-> !acb_gnt);
  a_no_ac_cycle_owned: assert property (@(posedge clk) disable iff (!rst_n) acidl |-> !acb_busy);

endmodule
