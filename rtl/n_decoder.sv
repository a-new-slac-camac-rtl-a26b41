// n_decoder: Dataway station-number decoder and N25 decoder of the CCU2.
//
// The Dataway has one N line per station. Their source is the binary N of the
// branch while the crate controller runs a Dataway cycle, or the encoded N that
// an auxiliary controller puts on the ACB while it owns the Dataway. A separate
// decoder, fed from the branch only, recognises N25, the crate controller's own
// station address. Codes 0 and 26..31 select no station line (this design's
// choice). Combinational: dw_n follows its inputs in the same cycle.
module n_decoder
  import ccu2_pkg::*;
#(
  parameter int unsigned NSTATIONS = 24
) (
  input  logic [4:0]           bn,       // binary N from the branch
  input  logic [4:0]           acb_n,    // encoded N from the ACB
  input  logic                 cc_drive, // crate controller runs a Dataway cycle
  input  logic                 ac_drive, // an auxiliary controller owns the Dataway
  output logic [NSTATIONS-1:0] dw_n,     // Dataway N1..N(NSTATIONS), bit i = N(i+1)
  output logic                 n25       // branch addresses the crate controller
);

  logic [4:0] src;

  always_comb begin
    if (cc_drive)      src = bn;
    else if (ac_drive) src = acb_n;
    else               src = 5'd0;
    for (int i = 0; i < int'(NSTATIONS); i++)
      dw_n[i] = (src == 5'(i + 1));
    n25 = (bn == N_CC);
  end

endmodule
