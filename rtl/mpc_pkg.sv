// mpc_pkg: types and constants shared by the Muon Port Card logic.
//
// An LCT (Local Charged Track) is 32 bits, sent as two 16-bit frames at
// 80 MHz. lct_t packs the second frame into bits [31:16] and the first frame
// into bits [15:0], so lct[15:0] is frame 1 and lct[31:16] is frame 2, with
// the field positions of the TMB-to-MPC and MPC-to-SP formats. The command
// codes are those the CCB sends on ccb_cmd[5:0]. Everything that is not a
// field position or command code (orbit length, firmware date default, LED
// numbering) is a choice of this implementation.
package mpc_pkg;

  localparam int unsigned N_TMB  = 9;          // trigger motherboards per crate
  localparam int unsigned N_MU   = 2 * N_TMB;  // LCTs per bunch crossing
  localparam int unsigned N_LINK = 3;          // optical links to the sector processor
  localparam int unsigned ORBIT  = 3564;       // bunch crossings per LHC orbit

  typedef struct packed {
    // frame 2
    logic [3:0] csc_id;
    logic       bc0;
    logic       bx0;
    logic       er;       // synchronization error
    logic       lr;       // L/R bend angle
    logic [7:0] hs;       // CLCT half-strip pattern ID
    // frame 1
    logic       vpf;      // valid pattern flag
    logic [3:0] quality;
    logic [3:0] pattern;  // CLCT pattern ID
    logic [6:0] wg;       // wire group ID
  } lct_t;

  // CCB commands decoded from ccb_cmd[5:0]
  typedef enum logic [5:0] {
    CMD_BC0        = 6'h01,
    CMD_L1RESET    = 6'h03,
    CMD_START_TRIG = 6'h06,
    CMD_STOP_TRIG  = 6'h07,
    CMD_INJECT     = 6'h30,
    CMD_BCNT_RESET = 6'h32
  } ccb_cmd_e;

  // Front panel LED positions in the led[] vector
  localparam int unsigned LED_MUON1 = 0;
  localparam int unsigned LED_MUON2 = 1;
  localparam int unsigned LED_MUON3 = 2;
  localparam int unsigned LED_DONE  = 3;
  localparam int unsigned LED_TEST  = 4;
  localparam int unsigned LED_HRES  = 5;
  localparam int unsigned LED_TCK   = 6;
  localparam int unsigned LED_SRES  = 7;
  localparam int unsigned LED_DACK  = 8;
  localparam int unsigned LED_IDLE  = 9;
  localparam int unsigned LED_RNTS  = 10;
  localparam int unsigned LED_L1RS  = 11;
  localparam int unsigned LED_FAEM  = 12;
  localparam int unsigned LED_FBEM  = 13;
  localparam int unsigned LED_FAFL  = 14;
  localparam int unsigned LED_FBFL  = 15;
  localparam int unsigned LED_CLK40 = 16;
  localparam int unsigned N_LED     = 17;

  // CSR1 firmware date code: day in [4:0], month in [8:5], year-2000 in [11:9]
  function automatic logic [15:0] fw_date(input int unsigned year, input int unsigned month,
                                          input int unsigned day);
    logic [15:0] v;
    v = '0;
    v[4:0]  = 5'(day);
    v[8:5]  = 4'(month);
    v[11:9] = 3'(year - 2000);
    return v;
  endfunction

endpackage
