// ac_pkg: sizes, command codes and register map shared by the Address Card
// FPGA logic.
//
// The card selects one of 41 rows of first-stage SQUIDs at a time by driving
// 41 row-select DACs (14 bits each, four DACs sharing one data bus, one
// latch clock per DAC). Those numbers come from the card's description. The
// command packet format, opcodes, register map and status codes below are
// this design's own choice: the card's description only requires that every
// command addressed to the card is answered, that reads return data, that
// other replies are short strings, that replies are whole bytes and that a
// garbled request is answered with an error notice.
package ac_pkg;

  // Row-select DAC array
  localparam int unsigned NUM_ROWS_DEF     = 41;
  localparam int unsigned DAC_W_DEF        = 14;
  localparam int unsigned DACS_PER_BUS_DEF = 4;

  // Packet framing
  localparam logic [7:0] REQ_PREAMBLE = 8'hA5;  // first byte of a request
  localparam logic [7:0] RPL_PREAMBLE = 8'h5A;  // first byte of a reply
  localparam logic [7:0] CARD_BCAST   = 8'hFF;  // addressed to every card
  localparam int unsigned REQ_LEN     = 7;      // PRE CARD OP PARAM DHI DLO CHK

  typedef enum logic [7:0] {
    OP_WRITE = 8'h01,
    OP_READ  = 8'h02,
    OP_GO    = 8'h03,
    OP_STOP  = 8'h04
  } op_e;

  typedef enum logic [7:0] {
    ST_OK        = 8'h00,
    ST_BAD_CHK   = 8'h01,  // checksum mismatch: garbled request
    ST_BAD_CMD   = 8'h02,  // unknown opcode or parameter
    ST_TRUNCATED = 8'h03   // request stopped before its last byte
  } status_e;

  // Parameter (register) map, PARAM byte of a request
  localparam logic [7:0] P_ON_BASE   = 8'h00;  // 0x00+row: row 'on' code
  localparam logic [7:0] P_OFF_BASE  = 8'h40;  // 0x40+row: row 'off' code
  localparam logic [7:0] P_MODE      = 8'h80;  // 0 = cycle rows, 1 = hold one row
  localparam logic [7:0] P_NUM_ROWS  = 8'h81;  // rows cycled per frame
  localparam logic [7:0] P_DWELL     = 8'h82;  // clocks each row stays selected
  localparam logic [7:0] P_NUM_FRM   = 8'h83;  // frames to run, 0 = until STOP
  localparam logic [7:0] P_FIX_ROW   = 8'h84;  // row held in single-row mode
  localparam logic [7:0] P_STATUS    = 8'h90;  // RO: {running, mode, sel_valid, sel_row}
  localparam logic [7:0] P_FRM_CNT   = 8'h91;  // RO: frames completed
  localparam logic [7:0] P_SYNC_ERR  = 8'h92;  // RO: Sync pulses off the frame boundary
  localparam logic [7:0] P_TEMP      = 8'hA0;  // RO: last sensor temperature word
  localparam logic [7:0] P_ID0       = 8'hA1;  // RO: sensor ROM ID bits 15:0 .. 63:48
  localparam logic [7:0] P_SLOT      = 8'hA5;  // RO: backplane slot number from the slot pins
  localparam logic [7:0] P_FW_VER    = 8'hA6;  // RO: firmware version
  localparam logic [7:0] P_TEMP_REQ  = 8'hA8;  // WO: start a sensor read

  typedef enum logic {
    MODE_CYCLE = 1'b0,
    MODE_FIXED = 1'b1
  } addr_mode_e;

  // Single-row write into the row bias table
  typedef struct packed {
    logic       en;
    logic       is_off;    // 1: off code, 0: on code
    logic [7:0] row;
    logic [15:0] data;
  } tbl_wr_t;

endpackage
