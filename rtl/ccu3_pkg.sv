// ccu3_pkg: types and constants shared by the 3CU control-card logic.
//
// The GBT frame is 120 bits per 25 ns bunch crossing: a 4-bit header, a 4-bit
// slow-control field (2 bits IC for the GBTX itself, 2 bits EC for the
// GBT-SCA), 80 bits of user data D and 32 bits of forward error correction.
// The bit positions below place the fields MSB first in that order, which is
// the usual GBT convention; the widths are those of the frame definition.
//
// The TFC word inside D is 48 bits wide and carries every TFC bit twice (two
// adjacent positions, the odd one naming the bit). Its layout (odd positions):
//   47..25 BXID[11:0], 23 reserved, 21 Synch, 19 Snapshot,
//   17..11 Calibration type[3:0], 9 BX veto, 7 NZS mode, 5 Header only,
//   3 FE reset, 1 BXID reset.
// Where the word sits inside D is this design's choice (TFC_LSB, default 0).
//
// The FEBs of a calorimeter crate receive only six command bits per bunch
// crossing: BX reset, FE reset, Header-only OR BX veto, Calibration, Snapshot
// and Synch (feb_cmd_t).
package ccu3_pkg;

  // ---------------- GBT frame ----------------
  localparam int unsigned GBT_FRAME_W = 120;
  localparam int unsigned GBT_HDR_W   = 4;
  localparam int unsigned GBT_SC_W    = 4;   // IC (2) + EC (2)
  localparam int unsigned GBT_D_W     = 80;
  localparam int unsigned GBT_FEC_W   = 32;
  localparam int unsigned GBT_HDR_MSB = 119;
  localparam int unsigned GBT_IC_MSB  = 115;
  localparam int unsigned GBT_EC_MSB  = 113;
  localparam int unsigned GBT_D_MSB   = 111;
  localparam int unsigned GBT_FEC_MSB = 31;
  // Header patterns of the GBT link (data frame / idle frame).
  localparam logic [3:0] GBT_HDR_DATA = 4'b0101;
  localparam logic [3:0] GBT_HDR_IDLE = 4'b0110;

  // ---------------- TFC word ----------------
  localparam int unsigned TFC_W        = 48;  // field width inside D
  localparam int unsigned TFC_BITS     = 24;  // distinct TFC bits (each sent twice)
  // Odd position of each field (the position that names the bit).
  localparam int unsigned TFC_POS_BXID_RST = 1;
  localparam int unsigned TFC_POS_FE_RST   = 3;
  localparam int unsigned TFC_POS_HDR_ONLY = 5;
  localparam int unsigned TFC_POS_NZS      = 7;
  localparam int unsigned TFC_POS_BX_VETO  = 9;
  localparam int unsigned TFC_POS_CAL_LSB  = 11; // CalType[0] at 11 .. [3] at 17
  localparam int unsigned TFC_POS_SNAPSHOT = 19;
  localparam int unsigned TFC_POS_SYNCH    = 21;
  localparam int unsigned TFC_POS_RESERVE  = 23;
  localparam int unsigned TFC_POS_BXID_LSB = 25; // BXID[0] at 25 .. [11] at 47

  typedef struct packed {
    logic [11:0] bxid;
    logic        reserve;
    logic        synch;
    logic        snapshot;
    logic [3:0]  cal_type;
    logic        bx_veto;
    logic        nzs;
    logic        header_only;
    logic        fe_reset;
    logic        bxid_reset;
  } tfc_t;

  // Command bits forwarded to each front-end board.
  typedef struct packed {
    logic bx_reset;
    logic fe_reset;
    logic hdr_or_veto;
    logic calib;
    logic snapshot;
    logic synch;
  } feb_cmd_t;

  localparam int unsigned FEB_CMD_W = $bits(feb_cmd_t);

  // ---------------- crate ----------------
  localparam int unsigned N_FEB     = 16;
  localparam int unsigned CRATE_ID_W = 8;

  // ---------------- ECS register map ----------------
  localparam int unsigned REG_AW = 7;
  localparam int unsigned REG_DW = 16;
  localparam logic [REG_AW-1:0] REG_FAULT_STATUS = 7'h01; // R, W1C
  localparam logic [REG_AW-1:0] REG_FAULT_LINE   = 7'h02; // R
  localparam logic [REG_AW-1:0] REG_DELATCH_PD   = 7'h03; // R/W
  localparam logic [REG_AW-1:0] REG_CRATE_ID     = 7'h04; // R

  // Serial command word sent to a FEB each bunch crossing:
  // start bit, six command bits, even parity over the command bits.
  function automatic logic [7:0] feb_word(feb_cmd_t c);
    return {1'b1, c, ^c};
  endfunction

endpackage
