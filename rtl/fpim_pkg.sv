// fpim_pkg: shared constants and types of the FPIM (field-programmable Ising
// machine) digital controller and tile array.
//
// The array sizes, configuration-bit counts, field widths, command field
// positions and command codes are the chip's own numbers. The oscillator
// array is 29 rows of 9 oscillator tiles; every oscillator row ends in an
// "east" tile and a "north" row of 9 north tiles plus a north-east tile sits
// on top, giving 30 configuration rows of 10 tiles. Row 29 is the north row.
// Command bytes and multi-byte responses travel least significant byte first
// and each byte least significant bit first (this byte order is a choice of
// this implementation).
package fpim_pkg;

  // ---- oscillator / tile architecture ----
  localparam int NUM_ROWS     = 30;   // configuration rows (29 oscillator rows + north row)
  localparam int NUM_COLS     = 10;   // tiles per row (9 oscillator tiles + east tile)
  localparam int OSC_PER_ROW  = 9;
  localparam int OSC_ROWS     = 29;
  localparam int NUM_OSC      = 261;

  // ---- configuration bits ----
  localparam int CFG_BITS_TILE       = 4422;
  localparam int CFG_BITS_EAST       = 1200;
  localparam int CFG_BITS_NORTH      = 1200;
  localparam int CFG_BITS_NORTH_EAST = 480;
  localparam int CFG_BITS_ROW        = 40998;  // 9*4422 + 1200
  localparam int CFG_BITS_NORTH_ROW  = 11280;  // 9*1200 + 480

  // ---- UART ----
  localparam int W_CPB       = 9;     // width of UART clock cycles per bit
  localparam int CPB_DEFAULT = 260;   // 5 MHz / 19200 baud

  // ---- frequency read ----
  localparam int W_FREQ_COUNTER = 20;
  localparam int W_FREQ_CAL     = 5;

  // ---- command word ----
  localparam int W_CMD          = 24;
  localparam int W_CMD_TYPE     = 3;
  localparam int W_OSC_COL_ID   = 4;
  localparam int W_OSC_ROW_ID   = 5;
  localparam int W_CFG_ROW_IDX  = 5;

  // field positions inside the (up to) 24-bit command word
  localparam int FLD_CMD_TYPE_LSB   = 0;
  localparam int FLD_CFG_ROW_LSB    = 3;   // 7:3
  localparam int FLD_FRQ_CAL_LSB    = 3;   // 7:3
  localparam int FLD_OSC_COL_LSB    = 8;   // 11:8
  localparam int FLD_OSC_ROW_LSB    = 16;  // 20:16
  localparam int FLD_ENABLE_BIT     = 3;   // 1: enable, 0: disable

  typedef enum logic [W_CMD_TYPE-1:0] {
    CMD_NOP           = 3'b000,
    CMD_READ_FREQ     = 3'b001,
    CMD_READ_PHASE    = 3'b010,
    CMD_ENABLE_CONFIG = 3'b100,
    CMD_PRGM_CONFIG   = 3'b101,
    CMD_READ_CONFIG   = 3'b110,
    CMD_RESET         = 3'b111
  } cmd_e;

  // number of bytes needed to hold n bits
  function automatic int bytes_for(int n);
    return (n + 7) / 8;
  endfunction

endpackage
