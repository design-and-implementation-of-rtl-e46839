// ate_pkg: widths, feedback taps and parallel-port command codes shared by
// the signature-analysis tester.
//
// The pattern generators are 80 bits wide and the signature analyzer has 23
// stages, as the design specifies. The signature travels on a 24-bit bus whose
// top bit is always zero, and it is read by the host one 4-bit nibble at a
// time. The command code assignment of the control-port decoder (cmd_e) is
// this design's own choice; only the idle code 4'hF is fixed by the design.
package ate_pkg;

  // Test pattern generators (pseudorandom and deterministic)
  localparam int unsigned TPG_W      = 80;
  // PRTPG feedback: primitive polynomial 1 + x^9 + x^79
  localparam int unsigned PR_TAP_HI  = 79;
  localparam int unsigned PR_TAP_LO  = 9;

  // Signature analyzer: 23 stages, primitive polynomial 1 + x^5 + x^23
  localparam int unsigned SA_W       = 23;
  localparam int unsigned SA_TAP_HI  = 23;
  localparam int unsigned SA_TAP_LO  = 5;

  // Signature bus to latch and display, and its nibble count
  localparam int unsigned SIG_W      = 24;
  localparam int unsigned NIBBLES    = SIG_W / 4;

  // Gate length of the pseudorandom mode and free-running repetition period,
  // in clocks of the selected 1 MHz clock
  localparam int unsigned DEF_GATE_CLOCKS  = 99_999;
  localparam int unsigned DEF_CYCLE_CLOCKS = 200_000;

  // Host parallel port
  localparam int unsigned DATA_W     = 8;   // data port D7..D0
  localparam int unsigned CTRL_W     = 4;   // control port C3..C0
  localparam int unsigned STATUS_W   = 5;   // status port S7..S3
  localparam int unsigned BYTES      = TPG_W / DATA_W;  // 10 byte strobes
  localparam int unsigned NSTROBES   = 13;  // BYTE0..BYTE9, DCLK, DRESET, DLATCH

  // Control-port command codes
  typedef enum logic [CTRL_W-1:0] {
    CMD_BYTE0  = 4'd0,   // codes 0..9 load byte k of the DTPG staging register
    CMD_DCLK   = 4'd10,  // apply the staged pattern and clock the SA
    CMD_DRESET = 4'd11,  // clear the SA
    CMD_DLATCH = 4'd12,  // latch the SA contents for transfer
    CMD_NEXT   = 4'd13,  // select the next signature nibble
    CMD_FIRST  = 4'd14,  // select nibble 0 and clear the ready flag
    CMD_IDLE   = 4'd15
  } cmd_e;

  // Strobe indices inside the 13-bit control bundle
  localparam int unsigned STB_DCLK   = 10;
  localparam int unsigned STB_DRESET = 11;
  localparam int unsigned STB_DLATCH = 12;

endpackage
