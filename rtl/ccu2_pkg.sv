// ccu2_pkg: shared types and constants of the CCU2 CAMAC type U crate controller.
//
// Holds the front-panel/internal switch bundle, the mode-switch decoding helpers,
// the N25 function codes the controller answers, the bit layouts of the control
// and status words, and the nominal Dataway cycle timing. The function codes and
// the meaning of the mode switch settings follow the CCU2 description; the bit
// layouts of the control and status words and the strobe placement inside the
// 1 us cycle are this design's own choices (the description lists the contents
// of the words but not where each bit sits).
package ccu2_pkg;

  // Number of Dataway stations with N and L lines.
  localparam int unsigned N_STATIONS = 24;
  // Station number of the crate controller itself.
  localparam logic [4:0] N_CC = 5'd25;
  // Branch crate address meaning "all crates".
  localparam logic [2:0] CR_ALL = 3'd7;

  // N25 function codes.
  localparam logic [4:0] F_RD_STATUS     = 5'd0;  // read status word
  localparam logic [4:0] F_RD_LAM        = 5'd1;  // read LAM data word
  localparam logic [4:0] F_RD_STATUS_LRI = 5'd4;  // read status, only the LRI holder answers
  localparam logic [4:0] F_TEST_LSUM     = 5'd8;  // test LAM sum (Q)
  localparam logic [4:0] F_WR_CTRL       = 5'd16; // write control word

  // Control word bits (written with N25 F16).
  localparam int unsigned CW_EL    = 0;
  localparam int unsigned CW_BRQ   = 1;
  localparam int unsigned CW_ACLRQ = 2;
  localparam int unsigned CW_I     = 3;
  localparam int unsigned CW_C     = 4;
  localparam int unsigned CW_Z     = 5;

  // Manual switches: front panel (MCRA, ELRG, ACLRQ enable, OFFLINE) and
  // internal PC board (mode register, EBRQ, EBI).
  typedef struct packed {
    logic [3:0] mcra;     // crate address 0..6, 7 all crates, 8/9 branch disconnect
    logic [2:0] mode;     // handshake / timing mode register 0..7
    logic       elrg;     // take part in LAM priority arbitration
    logic       aclrq_en; // ACLRQ flag may be set by program
    logic       offline;  // Dataway offline
    logic       ebrq;     // BRQ flag may be set by program
    logic       ebi;      // branch BI input enabled
  } ccu2_switches_t;

  // Status word (read with N25 F0, F4):
  //   [0] EBI  [1] EBRQ  [2] OFFLINE  [3] ACLRQ enable  [4] ELRG  [7:5] mode
  //   [11:8] MCRA  [12] EL  [13] BRQ  [14] ACLRQ  [15] I flag
  //   [16] C flag [17] Z flag [18] LRI held by this crate  [19] LAM sum
  //   [20] ACIDL  [23:21] zero
  localparam int unsigned ST_SW_LSB = 0;   // 12 switch bits, packed as ccu2_switches_t
  localparam int unsigned ST_EL     = 12;
  localparam int unsigned ST_BRQ    = 13;
  localparam int unsigned ST_ACLRQ  = 14;
  localparam int unsigned ST_I      = 15;
  localparam int unsigned ST_C      = 16;
  localparam int unsigned ST_Z      = 17;
  localparam int unsigned ST_LRI    = 18;
  localparam int unsigned ST_LSUM   = 19;
  localparam int unsigned ST_ACIDL  = 20;

  // Mode switch decoding.
  function automatic logic mode_handshake(input logic [2:0] m);
    return m >= 3'd2;           // 0,1: old SLAC branch, no handshake
  endfunction
  function automatic logic mode_int_timing(input logic [2:0] m);
    return m >= 3'd4;           // 4..7: internal timing generator
  endfunction
  function automatic logic mode_two_us(input logic [2:0] m);
    return m >= 3'd6;           // 6,7: 2 us cycle
  endfunction
  function automatic logic mode_last_crate(input logic [2:0] m);
    return m inside {3'd1, 3'd3, 3'd5, 3'd7}; // odd settings: Last Crate
  endfunction

  // Nominal 1 us Dataway cycle, in ns from the start of Busy.
  localparam int unsigned T_S1_ON  = 400;
  localparam int unsigned T_S1_OFF = 600;
  localparam int unsigned T_S2_ON  = 700;
  localparam int unsigned T_S2_OFF = 900;
  localparam int unsigned T_CYCLE  = 1000;

endpackage
