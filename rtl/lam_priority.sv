// lam_priority: crate LAM sum masking and crate priority arbitration (CCU2).
//
// The EL flag gates the LAM sum onto the branch BL line and into a
// request-grant chain between crates. Crates are chained in priority order:
// LRQ and LRI are bussed, the grant runs LGI -> LGO. A crate that requests
// (EL-masked LAM sum present and front panel ELRG on) blocks the grant to the
// crates below it. When it holds the grant and nobody asserts LRI, it takes
// LRI and keeps it until its masked LAM sum drops, e.g. because the host
// cleared EL; then a new arbitration may start. The host finds the winner with
// an all-crate N25 F4. The signals and their roles follow the CCU2
// description; the exact win/release rules are this design's. The grant
// passes combinationally; LRI is set one clock after the win condition.
module lam_priority (
  input  logic clk,
  input  logic rst_n,
  input  logic lsum,       // LAM OR sum
  input  logic el,         // EL masking flag
  input  logic elrg,       // arbitration enable switch
  input  logic connected,  // crate not branch-disconnected
  input  logic lgi,        // grant in from higher-priority crate
  input  logic lri_in,     // bussed LRI (includes this crate's own)
  output logic bl,         // branch LAM line
  output logic lrq,        // bussed LAM request
  output logic lgo,        // grant out to lower-priority crate
  output logic lri_own     // this crate holds LRI
);

  logic el_sum;

  always_comb begin
    el_sum = el && lsum && connected;
    bl     = el_sum;
    lrq    = el_sum && elrg;
    lgo    = lgi && !lrq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      lri_own <= 1'b0;
    else if (!lrq)                   lri_own <= 1'b0;
    else if (lgi && !lri_in)         lri_own <= 1'b1;
  end

endmodule
