// fpim_tile: digital logic of one FPIM tile.
//
// Configuration: CFG_BITS configuration registers form a shift register.
// While cfg_shift_en is high, each clk cycle moves every bit one place
// toward bit 0: cfg_write_in enters at bit CFG_BITS-1 and bit 0 leaves on
// cfg_write_out, which feeds the next tile to the east. The register
// contents drive the tile's switch block, connection blocks and oscillator
// helper (cfg_bits). Read-back uses a second, one-bit-per-tile path that runs
// from east to west: a flip-flop, loaded from cfg_read_in while cfg_read_sel
// is high, whose output is passed on as cfg_read_out only while cfg_enable is
// high.
//
// Oscillator selection (only when HAS_OSC): one mux-select flip-flop, loaded
// from msel_in while msel_shift_en is high, forms part of a shift chain
// through the oscillator tiles of a row. Its output, passed on only while
// msel_enable is high, is both the next tile's chain input (msel_out) and the
// select of two 2:1 muxes: 0 picks this tile's oscillator and sampled phase,
// 1 passes on the signals arriving from the tile to the east. The phase
// output is sampled into a flip-flop enabled by sample_phase after two
// register stages. Tiles without an oscillator (east column, north row) have
// no mux chain and drive their select outputs low.
//
// Timing: every register is clocked by clk; cfg_shift_en stands for the
// row's gated clock (an enable of this form is what the synthesis flow turns
// into a clock gate). rst clears all registers synchronously. The osc_in and
// phase_in inputs come from the analog oscillator and are not synchronised
// here; sel_osc_out is a purely combinational path.
//
// The register chain, the read-back stage, the mux-select stage, the two
// muxes and the two-stage sample_phase path follow the chip's tile diagrams.
// The combining of cfg_enable and msel_enable with the stored bit as an AND,
// the shift direction within the tile and the synchronous reset are choices
// of this implementation.
module fpim_tile #(
  parameter int CFG_BITS = 4422,
  parameter bit HAS_OSC  = 1'b1
) (
  input  logic                clk,
  input  logic                rst,
  // configuration write chain
  input  logic                cfg_shift_en,
  input  logic                cfg_write_in,
  output logic                cfg_write_out,
  output logic [CFG_BITS-1:0] cfg_bits,
  // configuration read-back chain
  input  logic                cfg_read_sel,
  input  logic                cfg_enable,
  input  logic                cfg_read_in,
  output logic                cfg_read_out,
  // oscillator / phase selection chain
  input  logic                msel_shift_en,
  input  logic                msel_enable,
  input  logic                msel_in,
  output logic                msel_out,
  input  logic                sample_phase,
  input  logic                osc_in,
  input  logic                phase_in,
  input  logic                right_osc,
  input  logic                right_phase,
  output logic                sel_osc_out,
  output logic                sel_phase_out
);

  // ---- configuration shift register ----
  logic [CFG_BITS-1:0] cfg_q;
  always_ff @(posedge clk) begin
    if (rst)               cfg_q <= '0;
    else if (cfg_shift_en) cfg_q <= {cfg_write_in, cfg_q[CFG_BITS-1:1]};
  end
  assign cfg_bits      = cfg_q;
  assign cfg_write_out = cfg_q[0];

  // ---- read-back stage ----
  logic rd_q;
  always_ff @(posedge clk) begin
    if (rst)               rd_q <= 1'b0;
    else if (cfg_read_sel) rd_q <= cfg_read_in;
  end
  assign cfg_read_out = rd_q & cfg_enable;

  // ---- oscillator selection ----
  if (HAS_OSC) begin : g_osc
    logic       msel_q;
    logic [1:0] sample_d;
    logic       phase_q;
    logic       sel;

    always_ff @(posedge clk) begin
      if (rst) begin
        msel_q   <= 1'b0;
        sample_d <= '0;
        phase_q  <= 1'b0;
      end else begin
        if (msel_shift_en) msel_q <= msel_in;
        sample_d <= {sample_d[0], sample_phase};
        if (sample_d[1]) phase_q <= phase_in;
      end
    end

    assign sel           = msel_q & msel_enable;
    assign msel_out      = sel;
    assign sel_osc_out   = sel ? right_osc   : osc_in;
    assign sel_phase_out = sel ? right_phase : phase_q;
  end else begin : g_no_osc
    // no oscillator in this tile: nothing to select
    assign msel_out      = 1'b0;
    assign sel_osc_out   = 1'b0;
    assign sel_phase_out = 1'b0;
  end

endmodule
