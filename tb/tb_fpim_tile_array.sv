// tb_fpim_tile_array: drives the streaming interface of a scaled tile array
// (3 oscillator rows of 3 tiles, small register counts) directly and checks:
// programming every row and the bit placement across tiles, that other rows
// are untouched, read-back through the per-tile stages with a latency of
// NUM_COLS shifts and with the row restored afterwards (ring read), column
// selection of oscillators and sampled phases in every row, and reset.
module tb_fpim_tile_array;
  localparam int OR = 3, OPR = 3, CT = 5, CE = 4, CN = 3, CNE = 2;
  localparam int NR = OR + 1, NC = OPR + 1;
  localparam int RB = OPR * CT + CE, NRB = OPR * CN + CNE;

  logic clk = 0, rst = 1;
  logic [NR-1:0] row_shift_en = '0, row_read_sel = '0, cfg_read_out;
  logic cfg_write_in = 0, cfg_enable = 0;
  logic [CT-1:0]  tile_cfg [OR][OPR];
  logic [CE-1:0]  east_cfg [OR];
  logic [CN-1:0]  north_cfg [OPR];
  logic [CNE-1:0] north_east_cfg;
  logic msel_in = 0, msel_shift_en = 0, msel_enable = 0, sample_phase = 0;
  logic [OR-1:0][OPR-1:0] osc_in = '0, phase_in = '0;
  logic [OR-1:0] sel_osc_out, sel_phase_out;
  int checks = 0, failures = 0;

  fpim_tile_array #(.OSC_ROWS(OR), .OSC_PER_ROW(OPR), .CFG_BITS_TILE(CT),
                    .CFG_BITS_EAST(CE), .CFG_BITS_NORTH(CN), .CFG_BITS_NE(CNE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // the row contents as {tile 0, ..., east tile}
  function automatic logic [RB-1:0] row_value(input int r);
    logic [RB-1:0] v = '0;
    if (r < OR) begin
      for (int c = 0; c < OPR; c++) v[CE + (OPR - 1 - c) * CT +: CT] = tile_cfg[r][c];
      v[CE-1:0] = east_cfg[r];
    end else begin
      for (int c = 0; c < OPR; c++) v[CNE + (OPR - 1 - c) * CN +: CN] = north_cfg[c];
      v[CNE-1:0] = north_east_cfg;
    end
    return v;
  endfunction

  function automatic int row_len(input int r);
    return r < OR ? RB : NRB;
  endfunction

  logic [RB-1:0] golden [NR];

  task automatic program_row(input int r, input logic [RB-1:0] d);
    for (int i = 0; i < row_len(r); i++) begin
      row_shift_en = NR'(1) << r;
      cfg_write_in = d[i];
      @(negedge clk);
    end
    row_shift_en = '0;
  endtask

  task automatic read_row(input int r, output logic [RB-1:0] d, output logic [NC-1:0] lead);
    d = '0;
    cfg_enable = 1;
    for (int i = 0; i < row_len(r) + NC; i++) begin
      row_shift_en = NR'(1) << r;
      row_read_sel = NR'(1) << r;
      #1;
      cfg_write_in = cfg_read_out[r];
      if (i < NC) lead[i] = cfg_read_out[r];
      else d[i - NC] = cfg_read_out[r];
      @(negedge clk);
    end
    row_shift_en = '0;
    row_read_sel = '0;
    cfg_enable = 0;
  endtask

  task automatic select_col(input int c);
    msel_enable = 1;
    for (int k = 0; k < OPR; k++) begin
      msel_shift_en = 1;
      msel_in = (OPR - 1 - k) < c;
      @(negedge clk);
    end
    msel_shift_en = 0;
    msel_in = 0;
  endtask

  initial begin
    logic [RB-1:0] d;
    logic [NC-1:0] lead;
    logic [OR-1:0][OPR-1:0] ph;
    repeat (2) @(negedge clk);
    rst = 0;
    // ---- program every row ----
    for (int r = 0; r < NR; r++) begin
      golden[r] = RB'({$urandom, $urandom}) & ((RB'(1) << row_len(r)) - 1);
      program_row(r, golden[r]);
    end
    for (int r = 0; r < NR; r++)
      check(row_value(r) == golden[r], $sformatf("row %0d holds %h want %h", r, row_value(r), golden[r]));
    // ---- read every row back (twice: the read must not disturb the row) ----
    for (int pass = 0; pass < 2; pass++)
      for (int r = 0; r < NR; r++) begin
        read_row(r, d, lead);
        check(d == golden[r], $sformatf("read row %0d got %h want %h", r, d, golden[r]));
        check(row_value(r) == golden[r], $sformatf("row %0d restored after read", r));
        if (pass == 0) check(lead == '0, "read stages empty after reset");
      end
    // ---- read path blocked while cfg_enable is low ----
    row_read_sel = '1;
    repeat (NC) @(negedge clk);
    row_read_sel = '0;
    check(cfg_read_out == '0, "read outputs low with cfg_enable low");
    // ---- oscillator selection ----
    for (int k = 0; k < 4; k++) begin
      osc_in = (OR * OPR)'($urandom);
      for (int c = 0; c < OPR; c++) begin
        select_col(c);
        for (int r = 0; r < OR; r++)
          check(sel_osc_out[r] == osc_in[r][c], $sformatf("osc row %0d col %0d", r, c));
      end
    end
    // ---- phase sampling and selection ----
    ph = (OR * OPR)'($urandom);
    phase_in = ph;
    sample_phase = 1;
    @(negedge clk);
    sample_phase = 0;
    repeat (2) @(negedge clk);
    phase_in = ~ph;        // later changes must not show
    for (int c = 0; c < OPR; c++) begin
      select_col(c);
      for (int r = 0; r < OR; r++)
        check(sel_phase_out[r] == ph[r][c], $sformatf("phase row %0d col %0d", r, c));
    end
    msel_enable = 0;
    // ---- reset clears everything ----
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int r = 0; r < NR; r++) check(row_value(r) == '0, $sformatf("row %0d cleared", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
