// ttcl_pkg: constants and types shared by the TTCL interface firmware.
//
// The TTCL link carries one 16-bit payload word every 20 ns (a 50 MHz word
// clock), grouped into frames of five words; both numbers are the link's own.
// The layout of a frame and the type codes below are this design's choice:
//   word0 = {FRAME_MARK, frame type}
//   word1..word3 = timestamp bits 47:32, 31:16, 15:0 (timestamp and
//                  trigger-accept frames)
//   word1 = register address, word2 = register data (command frames)
//   word4 = spare
// A frame-sync frame has its header followed by the SYNC_FILL pattern.
// Timestamps are 48 bits wide and count word-clock cycles.
//
// The register map of the interface FPGA (written over SPI or by command
// frames) is also defined here; its addresses are this design's choice.
package ttcl_pkg;

  localparam int WORD_W      = 16;
  localparam int FRAME_WORDS = 5;
  localparam int POS_W       = 3;
  localparam int TS_W        = 48;
  localparam int ADDR_W      = 7;

  localparam logic [7:0]        FRAME_MARK = 8'hBC;
  localparam logic [WORD_W-1:0] SYNC_FILL  = 16'hF0F0;

  typedef enum logic [7:0] {
    FT_IDLE        = 8'h00,
    FT_TIMESTAMP   = 8'h01,   // distribution of the system timestamp
    FT_FRAME_SYNC  = 8'h02,   // marks the frame order for receivers
    FT_IMP_SYNC    = 8'h03,   // imperative sync: clear timestamp counters
    FT_TRIG_ACCEPT = 8'h04,   // trigger accept for the timestamp carried
    FT_COMMAND     = 8'h05    // synchronous register write
  } frame_type_e;

  typedef struct packed {
    frame_type_e       ftype;
    logic [WORD_W-1:0] w1;
    logic [WORD_W-1:0] w2;
    logic [WORD_W-1:0] w3;
    logic [WORD_W-1:0] w4;
  } frame_t;

  // Register map of the interface FPGA.
  localparam logic [ADDR_W-1:0] REG_CTRL       = 7'h00; // rw: bit0 trigger enable, bit1 sync enable
  localparam logic [ADDR_W-1:0] REG_OFFSET     = 7'h01; // rw: offset added to accept timestamps
  localparam logic [ADDR_W-1:0] REG_TRIG_DELAY = 7'h02; // rw: trigger flag delay, cycles (bits 7:0)
  localparam logic [ADDR_W-1:0] REG_STATUS     = 7'h03; // ro: bit0 aligned, bit1 lock
  localparam logic [ADDR_W-1:0] REG_LATE_CNT   = 7'h04; // ro: accepts dropped as late or on overflow
  localparam logic [ADDR_W-1:0] REG_TRIG_CNT   = 7'h05; // ro: trigger flags created
  localparam logic [ADDR_W-1:0] REG_SYS_TS0    = 7'h06; // ro: last system timestamp bits 15:0
  localparam logic [ADDR_W-1:0] REG_SYS_TS1    = 7'h07; // ro: bits 31:16
  localparam logic [ADDR_W-1:0] REG_SYS_TS2    = 7'h08; // ro: bits 47:32
  localparam logic [ADDR_W-1:0] REG_ACC_CNT    = 7'h09; // ro: trigger accept frames received
  localparam logic [ADDR_W-1:0] REG_ID         = 7'h0F; // ro: constant identification word

  localparam logic [WORD_W-1:0] ID_VALUE   = 16'h7C01;
  localparam logic [WORD_W-1:0] CTRL_RESET = 16'h0003;

  function automatic logic [WORD_W-1:0] header(frame_type_e t);
    return {FRAME_MARK, t};
  endfunction

endpackage
