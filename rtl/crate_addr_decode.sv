// crate_addr_decode: branch crate address recognition for the CCU2.
//
// The SLAC parallel branch carries a 3-bit binary crate address; code 7 means
// "all crates". The front-panel MCRA switch sets this crate's address 0..6;
// setting 7 makes the crate answer only all-crate operations, and settings 8
// and 9 (Branch Disconnect) cut the crate off from the branch logically. The
// binary coding, CR7 and the disconnect settings follow the CCU2 description;
// treating MCRA 7 as "all-crate operations only" and MCRA 10..15 like a
// disconnect are this design's choices. Purely combinational.
module crate_addr_decode
  import ccu2_pkg::*;
(
  input  logic [3:0] mcra,       // front panel crate address switch
  input  logic [2:0] bcr,        // branch crate address
  output logic       connected,  // crate is logically on the branch
  output logic       own,        // addressed individually
  output logic       all_crates, // CR7 seen by a connected crate
  output logic       addressed   // own or all_crates
);

  always_comb begin
    connected  = (mcra <= 4'd7);
    own        = connected && (mcra <= 4'd6) && (bcr == mcra[2:0]);
    all_crates = connected && (bcr == CR_ALL);
    addressed  = own || all_crates;
  end

endmodule
