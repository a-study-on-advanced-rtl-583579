// fpim_tile_array: the digital side of the FPIM tile array.
//
// OSC_ROWS oscillator rows each hold OSC_PER_ROW oscillator tiles followed by
// one east tile; a north row of OSC_PER_ROW north tiles and one north-east
// tile sits on top as row OSC_ROWS (29 at full size). Every row is one
// configuration shift chain running west to east, so the controller needs a
// single write wire (cfg_write_in, shared by all rows) and one read wire per
// row: a row shifts only while its row_shift_en bit (the row's gated clock)
// is high. The read-back path of a row runs from the east end of the chain
// through one register stage per tile back to the west edge, where it leaves
// as cfg_read_out[row]; the stages of a row move while row_read_sel[row] is
// high and pass data only while cfg_enable is high. Read-back therefore
// delays a row's bits by NUM_COLS = OSC_PER_ROW+1 shifts.
//
// After a row has shifted in its full length of bits, bit k of the streamed
// data, counting the first bit shifted in as bit 0, sits at position k of
// {tile 0, tile 1, ..., east tile} (tile 0 in the most significant bits).
//
// Oscillator selection: all oscillator rows share one mux-select chain input
// (msel_in) and its controls, so the same column is selected in every row.
// Each row's chain runs from tile 0 eastward; sel_osc_out[row] and
// sel_phase_out[row] are taken at the west edge and show the oscillator (and
// sampled phase) of the first tile whose select bit is 0.
//
// Sizes, the 30 x 10 tile arrangement, the per-tile bit counts and the
// interface signals follow the chip; rows are numbered 0 (bottom) to 29
// (north row).
module fpim_tile_array #(
  parameter int OSC_ROWS       = 29,
  parameter int OSC_PER_ROW    = 9,
  parameter int CFG_BITS_TILE  = 4422,
  parameter int CFG_BITS_EAST  = 1200,
  parameter int CFG_BITS_NORTH = 1200,
  parameter int CFG_BITS_NE    = 480,
  localparam int NUM_ROWS      = OSC_ROWS + 1
) (
  input  logic                                   clk,
  input  logic                                   rst,
  // configuration streaming
  input  logic [NUM_ROWS-1:0]                    row_shift_en,
  input  logic                                   cfg_write_in,
  input  logic [NUM_ROWS-1:0]                    row_read_sel,
  input  logic                                   cfg_enable,
  output logic [NUM_ROWS-1:0]                    cfg_read_out,
  // configuration registers, to the analog fabric
  output logic [CFG_BITS_TILE-1:0]               tile_cfg [OSC_ROWS][OSC_PER_ROW],
  output logic [CFG_BITS_EAST-1:0]               east_cfg [OSC_ROWS],
  output logic [CFG_BITS_NORTH-1:0]              north_cfg [OSC_PER_ROW],
  output logic [CFG_BITS_NE-1:0]                 north_east_cfg,
  // oscillator / phase selection
  input  logic                                   msel_in,
  input  logic                                   msel_shift_en,
  input  logic                                   msel_enable,
  input  logic                                   sample_phase,
  input  logic [OSC_ROWS-1:0][OSC_PER_ROW-1:0]   osc_in,
  input  logic [OSC_ROWS-1:0][OSC_PER_ROW-1:0]   phase_in,
  output logic [OSC_ROWS-1:0]                    sel_osc_out,
  output logic [OSC_ROWS-1:0]                    sel_phase_out
);

  for (genvar r = 0; r < NUM_ROWS; r++) begin : g_row
    // chain signals between tiles; index c is the input side of tile c,
    // index OSC_PER_ROW+1 is the east boundary
    logic [OSC_PER_ROW+1:0] wr;     // write chain, west to east
    logic [OSC_PER_ROW+1:0] rd;     // read chain, east to west (rd[c] leaves tile c)
    logic [OSC_PER_ROW:0]   ms;     // mux-select chain, west to east
    logic [OSC_PER_ROW:0]   so;     // selected oscillator, east to west
    logic [OSC_PER_ROW:0]   sp;     // selected phase, east to west

    assign wr[0]                 = cfg_write_in;
    assign ms[0]                 = msel_in;
    assign so[OSC_PER_ROW]       = 1'b0;
    assign sp[OSC_PER_ROW]       = 1'b0;
    assign rd[OSC_PER_ROW+1]     = wr[OSC_PER_ROW+1];   // east end turns the chain around
    assign cfg_read_out[r]       = rd[0];

    for (genvar c = 0; c < OSC_PER_ROW; c++) begin : g_col
      if (r < OSC_ROWS) begin : g_osc_tile
        fpim_tile #(.CFG_BITS(CFG_BITS_TILE), .HAS_OSC(1'b1)) u_tile (
          .clk, .rst,
          .cfg_shift_en (row_shift_en[r]),
          .cfg_write_in (wr[c]),
          .cfg_write_out(wr[c+1]),
          .cfg_bits     (tile_cfg[r][c]),
          .cfg_read_sel (row_read_sel[r]),
          .cfg_enable,
          .cfg_read_in  (rd[c+1]),
          .cfg_read_out (rd[c]),
          .msel_shift_en,
          .msel_enable,
          .msel_in      (ms[c]),
          .msel_out     (ms[c+1]),
          .sample_phase,
          .osc_in       (osc_in[r][c]),
          .phase_in     (phase_in[r][c]),
          .right_osc    (so[c+1]),
          .right_phase  (sp[c+1]),
          .sel_osc_out  (so[c]),
          .sel_phase_out(sp[c])
        );
      end else begin : g_north_tile
        fpim_tile #(.CFG_BITS(CFG_BITS_NORTH), .HAS_OSC(1'b0)) u_tile (
          .clk, .rst,
          .cfg_shift_en (row_shift_en[r]),
          .cfg_write_in (wr[c]),
          .cfg_write_out(wr[c+1]),
          .cfg_bits     (north_cfg[c]),
          .cfg_read_sel (row_read_sel[r]),
          .cfg_enable,
          .cfg_read_in  (rd[c+1]),
          .cfg_read_out (rd[c]),
          .msel_shift_en(1'b0),
          .msel_enable  (1'b0),
          .msel_in      (1'b0),
          .msel_out     (ms[c+1]),
          .sample_phase (1'b0),
          .osc_in       (1'b0),
          .phase_in     (1'b0),
          .right_osc    (1'b0),
          .right_phase  (1'b0),
          .sel_osc_out  (so[c]),
          .sel_phase_out(sp[c])
        );
      end
    end

    // east column tile (north-east tile in the north row)
    if (r < OSC_ROWS) begin : g_east
      fpim_tile #(.CFG_BITS(CFG_BITS_EAST), .HAS_OSC(1'b0)) u_tile (
        .clk, .rst,
        .cfg_shift_en (row_shift_en[r]),
        .cfg_write_in (wr[OSC_PER_ROW]),
        .cfg_write_out(wr[OSC_PER_ROW+1]),
        .cfg_bits     (east_cfg[r]),
        .cfg_read_sel (row_read_sel[r]),
        .cfg_enable,
        .cfg_read_in  (rd[OSC_PER_ROW+1]),
        .cfg_read_out (rd[OSC_PER_ROW]),
        .msel_shift_en(1'b0), .msel_enable(1'b0), .msel_in(1'b0), .msel_out(),
        .sample_phase (1'b0), .osc_in(1'b0), .phase_in(1'b0),
        .right_osc    (1'b0), .right_phase(1'b0),
        .sel_osc_out  (), .sel_phase_out()
      );
    end else begin : g_north_east
      fpim_tile #(.CFG_BITS(CFG_BITS_NE), .HAS_OSC(1'b0)) u_tile (
        .clk, .rst,
        .cfg_shift_en (row_shift_en[r]),
        .cfg_write_in (wr[OSC_PER_ROW]),
        .cfg_write_out(wr[OSC_PER_ROW+1]),
        .cfg_bits     (north_east_cfg),
        .cfg_read_sel (row_read_sel[r]),
        .cfg_enable,
        .cfg_read_in  (rd[OSC_PER_ROW+1]),
        .cfg_read_out (rd[OSC_PER_ROW]),
        .msel_shift_en(1'b0), .msel_enable(1'b0), .msel_in(1'b0), .msel_out(),
        .sample_phase (1'b0), .osc_in(1'b0), .phase_in(1'b0),
        .right_osc    (1'b0), .right_phase(1'b0),
        .sel_osc_out  (), .sel_phase_out()
      );
    end

    if (r < OSC_ROWS) begin : g_sel_out
      assign sel_osc_out[r]   = so[0];
      assign sel_phase_out[r] = sp[0];
    end
  end

endmodule
