// ciz_control: Dataway Clear, Initialize and Inhibit generation (CCU2).
//
// C, Z and I can be executed globally from the branch or locally from three
// programmable flags. Dataway I is the branch BI line (if the internal EBI
// switch enables it) ORed with the I flag. Branch BC and BZ act only in an
// operation addressed to all crates (CR7); they are put on the Dataway for the
// whole of the Dataway cycle the handshake block runs for them. Writing the C
// or Z flag requests a local cycle (forced ACL, internal timing) in which C
// and/or Z accompany the cycle; both flags clear at its end. Every Z cycle
// sets the I flag and pulses z_done, which resets the EL, BRQ and ACLRQ flags
// elsewhere. Reset (power-up) sets the Z flag, so the crate is initialised.
// This behaviour follows the CCU2 description; holding C/Z for the whole
// Busy period and "control word bits set C/Z but never clear them" are this
// design's choices. z_done comes one clock after Z falls.
module ciz_control (
  input  logic clk,
  input  logic rst_n,
  input  logic bi,          // branch inhibit
  input  logic bc,          // branch clear
  input  logic bz,          // branch initialise
  input  logic ebi,         // BI enable switch
  input  logic connected,   // crate on the branch
  input  logic all_crates,  // operation addressed to all crates
  input  logic wr_stb,      // control word write pulse
  input  logic wr_i,        // I flag bit of the control word
  input  logic wr_c,        // C flag bit
  input  logic wr_z,        // Z flag bit
  input  logic dw_b,        // Dataway Busy of the crate controller's cycle
  input  logic local_cycle, // local C/Z cycle in progress
  input  logic cycle_done,  // pulse one clock after a cycle ended
  output logic iflag,
  output logic cflag,
  output logic zflag,
  output logic local_req,   // run a local C/Z cycle
  output logic dw_c,        // Dataway C
  output logic dw_z,        // Dataway Z
  output logic dw_i,        // Dataway I
  output logic z_done       // pulse: a Z cycle ended
);

  logic dw_z_q;
  logic local_q;  // local_cycle one clock late, aligned with cycle_done

  always_comb begin
    dw_i      = (bi && ebi && connected) || iflag;
    dw_c      = dw_b && (local_cycle ? cflag : (bc && all_crates));
    dw_z      = dw_b && (local_cycle ? zflag : (bz && all_crates));
    local_req = cflag || zflag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iflag  <= 1'b0;
      cflag  <= 1'b0;
      zflag  <= 1'b1;      // power-up initialises the crate
      dw_z_q <= 1'b0;
      local_q <= 1'b0;
      z_done <= 1'b0;
    end else begin
      dw_z_q <= dw_z;
      local_q <= local_cycle;
      z_done <= dw_z_q && !dw_z;
      if (wr_stb) begin
        iflag <= wr_i;
        cflag <= cflag || wr_c;
        zflag <= zflag || wr_z;
      end
      if (dw_z_q && !dw_z) iflag <= 1'b1;
      if (local_q && cycle_done) begin
        cflag <= 1'b0;
        zflag <= 1'b0;
      end
    end
  end

endmodule
