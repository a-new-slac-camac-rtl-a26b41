// lam_register: LAM latch of the CCU2.
//
// The Dataway L lines of all stations are staticized in a register that the
// host reads with N25 F1 and that is buffered onto the ACB L outputs. The OR of
// the latched bits is the crate's LAM sum. The register samples every clock and
// holds its value while `freeze` is high (a LAM read in its data time), so the
// word returned to the branch is stable; the sampling scheme is this design's
// choice. Latency: one clock from dw_l to lam and lsum.
module lam_register #(
  parameter int unsigned NSTATIONS = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NSTATIONS-1:0] dw_l,   // Dataway L lines
  input  logic                 freeze, // hold the latch
  output logic [NSTATIONS-1:0] lam,    // latched LAM pattern (also ACB L outputs)
  output logic                 lsum    // OR of the latched LAMs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lam <= '0;
    else if (!freeze) lam <= dw_l;
  end

  assign lsum = |lam;

endmodule
