// data_interface: branch/Dataway data routing and F, A gating (CCU2).
//
// Branch write data goes to the Dataway W bus, and Dataway R or the internal
// read bus (N25 commands) goes back to the branch read lines, with Q and X.
// The function code takes two levels of gating: the internal decoder always
// sees the branch F, but F, A and W reach the Dataway only while the crate
// controller runs its own Dataway cycle, so N25 commands work without taking
// the Dataway. W is driven for write codes F16..F23 and R returned for read
// codes F0..F7. The routing follows the CCU2 description; the F-range rules
// and the separate read and write vectors are this design's choices.
// Combinational.
module data_interface (
  input  logic [23:0] bw,        // branch write data
  input  logic [4:0]  bf,        // branch function code
  input  logic [3:0]  ba,        // branch subaddress
  input  logic        dw_cycle,  // crate controller Dataway cycle
  input  logic [23:0] dw_r,      // Dataway R bus
  input  logic        dw_q,      // Dataway Q
  input  logic        dw_x,      // Dataway X
  input  logic        int_sel,   // N25 command in progress
  input  logic [23:0] int_rdata, // internal read bus
  input  logic        int_rd_en, // internal read data valid
  input  logic        int_q,
  input  logic        int_x,
  output logic [23:0] dw_w,      // Dataway W bus
  output logic [4:0]  dw_f,      // Dataway F
  output logic [3:0]  dw_a,      // Dataway A
  output logic [23:0] br,        // branch read data
  output logic        bq,        // branch Q
  output logic        bx         // branch X
);

  logic is_write, is_read;

  always_comb begin
    is_write = (bf[4:3] == 2'b10);
    is_read  = (bf[4:3] == 2'b00);
    dw_f     = dw_cycle ? bf : '0;
    dw_a     = dw_cycle ? ba : '0;
    dw_w     = (dw_cycle && is_write) ? bw : '0;
    if (int_rd_en)               br = int_rdata;
    else if (dw_cycle && is_read) br = dw_r;
    else                          br = '0;
    bq = int_sel ? int_q : (dw_cycle && dw_q);
    bx = int_sel ? int_x : (dw_cycle && dw_x);
  end

endmodule
