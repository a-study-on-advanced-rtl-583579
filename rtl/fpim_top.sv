// fpim_top: digital part of the 261-spin FPIM (field-programmable Ising
// machine) chip.
//
// The chip's Ising network is analog: 261 oscillators on a 29 x 9 grid of
// tiles, coupled through tri-state switch and connection blocks whose
// settings, together with the oscillator helper parameters, are held in
// about 1.2 million configuration registers. This module holds the digital
// logic around that network: the UART-driven top-level controller
// (fpim_controller) and the register chains, read-back path and oscillator
// selection muxes of every tile (fpim_tile_array). The analog parts stay
// outside: the configuration register contents leave on tile_cfg, east_cfg,
// north_cfg and north_east_cfg, and each oscillator's output and phase
// detector output come in on osc_in and phase_in.
//
// Interface: clk is the chip clock (5 MHz gives the 19200 baud reset rate),
// rst_n an active-low reset that also clears every configuration register.
// uart_rx/uart_tx are the host link (8N1, see fpim_controller for commands).
// cfg_enable tells the analog fabric that the configuration is valid.
// osc_in/phase_in are indexed [row][column]; oscillator number
// row*OSC_PER_ROW + column.
//
// Parameters default to the chip's sizes; smaller values give a scaled array
// with the same structure.
module fpim_top #(
  parameter int OSC_ROWS       = 29,
  parameter int OSC_PER_ROW    = 9,
  parameter int CFG_BITS_TILE  = 4422,
  parameter int CFG_BITS_EAST  = 1200,
  parameter int CFG_BITS_NORTH = 1200,
  parameter int CFG_BITS_NE    = 480,
  parameter int CPB_RESET      = 260
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 uart_rx,
  output logic                                 uart_tx,
  output logic                                 cfg_enable,
  output logic [CFG_BITS_TILE-1:0]             tile_cfg [OSC_ROWS][OSC_PER_ROW],
  output logic [CFG_BITS_EAST-1:0]             east_cfg [OSC_ROWS],
  output logic [CFG_BITS_NORTH-1:0]            north_cfg [OSC_PER_ROW],
  output logic [CFG_BITS_NE-1:0]               north_east_cfg,
  input  logic [OSC_ROWS-1:0][OSC_PER_ROW-1:0] osc_in,
  input  logic [OSC_ROWS-1:0][OSC_PER_ROW-1:0] phase_in
);

  localparam int NUM_ROWS = OSC_ROWS + 1;

  logic                array_rst, tiles_rst;
  logic [NUM_ROWS-1:0] row_shift_en, row_read_sel, cfg_read_out;
  logic                cfg_write_in;
  logic                msel_in, msel_shift_en, msel_enable, sample_phase;
  logic [OSC_ROWS-1:0] sel_osc_out, sel_phase_out;

  fpim_controller #(
    .OSC_ROWS(OSC_ROWS), .OSC_PER_ROW(OSC_PER_ROW),
    .CFG_BITS_TILE(CFG_BITS_TILE), .CFG_BITS_EAST(CFG_BITS_EAST),
    .CFG_BITS_NORTH(CFG_BITS_NORTH), .CFG_BITS_NE(CFG_BITS_NE),
    .CPB_RESET(CPB_RESET)
  ) u_ctrl (
    .clk, .rst_n,
    .uart_rx_i(uart_rx), .uart_tx_o(uart_tx),
    .array_rst, .row_shift_en, .cfg_write_in, .row_read_sel, .cfg_enable, .cfg_read_out,
    .msel_in, .msel_shift_en, .msel_enable, .sample_phase, .sel_osc_out, .sel_phase_out
  );

  // the tile registers reset with the chip and on the reset command
  assign tiles_rst = array_rst | ~rst_n;

  fpim_tile_array #(
    .OSC_ROWS(OSC_ROWS), .OSC_PER_ROW(OSC_PER_ROW),
    .CFG_BITS_TILE(CFG_BITS_TILE), .CFG_BITS_EAST(CFG_BITS_EAST),
    .CFG_BITS_NORTH(CFG_BITS_NORTH), .CFG_BITS_NE(CFG_BITS_NE)
  ) u_array (
    .clk, .rst(tiles_rst),
    .row_shift_en, .cfg_write_in, .row_read_sel, .cfg_enable, .cfg_read_out,
    .tile_cfg, .east_cfg, .north_cfg, .north_east_cfg,
    .msel_in, .msel_shift_en, .msel_enable, .sample_phase,
    .osc_in, .phase_in, .sel_osc_out, .sel_phase_out
  );

endmodule
