// tb_fpim_tile: checks one oscillator tile and one tile without an
// oscillator: the configuration shift register (bit order, hold when not
// enabled, write_out), the read-back stage and its gating by cfg_enable, the
// mux-select stage and its gating by msel_enable, the oscillator and phase
// muxes, the two-cycle delay of sample_phase before the phase is captured,
// and synchronous reset.
module tb_fpim_tile;
  localparam int N = 13;
  logic         clk = 0, rst = 1;
  logic         cfg_shift_en = 0, cfg_write_in = 0, cfg_write_out;
  logic [N-1:0] cfg_bits;
  logic         cfg_read_sel = 0, cfg_enable = 0, cfg_read_in = 0, cfg_read_out;
  logic         msel_shift_en = 0, msel_enable = 0, msel_in = 0, msel_out;
  logic         sample_phase = 0, osc_in = 0, phase_in = 0, right_osc = 0, right_phase = 0;
  logic         sel_osc_out, sel_phase_out;
  // tile without oscillator
  logic [6:0]   e_bits;
  logic         e_wout, e_rout, e_msel, e_so, e_sp;
  int checks = 0, failures = 0;

  fpim_tile #(.CFG_BITS(N), .HAS_OSC(1'b1)) dut (.*);

  fpim_tile #(.CFG_BITS(7), .HAS_OSC(1'b0)) dut_e (
    .clk, .rst, .cfg_shift_en, .cfg_write_in, .cfg_write_out(e_wout), .cfg_bits(e_bits),
    .cfg_read_sel, .cfg_enable, .cfg_read_in, .cfg_read_out(e_rout),
    .msel_shift_en, .msel_enable, .msel_in, .msel_out(e_msel), .sample_phase,
    .osc_in, .phase_in, .right_osc, .right_phase, .sel_osc_out(e_so), .sel_phase_out(e_sp)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [N-1:0] d;
    logic [N-1:0] outs;
    logic         rd_m;
    repeat (2) @(negedge clk);
    rst = 0;
    check(cfg_bits == '0 && e_bits == '0, "reset clears config");
    // ---- shift N random bits: first bit in ends at bit 0 ----
    d = N'($urandom);
    for (int i = 0; i < N; i++) begin
      cfg_shift_en = 1;
      cfg_write_in = d[i];
      @(negedge clk);
    end
    cfg_shift_en = 0;
    check(cfg_bits == d, $sformatf("config %h want %h", cfg_bits, d));
    check(cfg_write_out == d[0], "write_out is bit 0");
    check(e_bits == d[N-1 -: 7], "second tile holds the last 7 bits in");
    cfg_write_in = ~cfg_write_in;
    repeat (3) @(negedge clk);
    check(cfg_bits == d, "config holds without shift enable");
    // ---- shift out again through write_out ----
    for (int i = 0; i < N; i++) begin
      outs[i] = cfg_write_out;
      cfg_shift_en = 1;
      cfg_write_in = 0;
      @(negedge clk);
    end
    cfg_shift_en = 0;
    check(outs == d, "bits leave in the order they entered");
    // ---- read-back stage ----
    cfg_read_sel = 1; cfg_read_in = 1; cfg_enable = 0;
    @(negedge clk);
    check(cfg_read_out == 0 && e_rout == 0, "read path blocked while cfg_enable low");
    cfg_enable = 1;
    #1;
    check(cfg_read_out == 1 && e_rout == 1, "read stage loaded and passed with cfg_enable");
    cfg_read_sel = 0; cfg_read_in = 0;
    @(negedge clk);
    check(cfg_read_out == 1, "read stage holds without select");
    cfg_read_sel = 1;
    @(negedge clk);
    check(cfg_read_out == 0, "read stage follows read_in when selected");
    // random select / enable / data: the output is the stage ANDed with the enable
    rd_m = 1'b0;
    for (int i = 0; i < 32; i++) begin
      cfg_read_in  = 1'($urandom);
      cfg_read_sel = 1'($urandom);
      cfg_enable   = 1'($urandom);
      #1;
      check(cfg_read_out == (rd_m & cfg_enable), "read output gated by cfg_enable");
      if (cfg_read_sel) rd_m = cfg_read_in;
      @(negedge clk);
      check(cfg_read_out == (rd_m & cfg_enable), "read stage after random edge");
    end
    cfg_read_sel = 0; cfg_enable = 0;
    // ---- oscillator / phase selection ----
    osc_in = 1; right_osc = 0; phase_in = 1; right_phase = 0;
    msel_enable = 1;
    #1;
    check(sel_osc_out == 1, "select 0 picks own oscillator");
    check(e_so == 0 && e_sp == 0 && e_msel == 0, "tile without oscillator drives 0");
    msel_shift_en = 1; msel_in = 1;
    @(negedge clk);
    msel_shift_en = 0; msel_in = 0;
    check(msel_out == 1, "select bit passed on");
    check(sel_osc_out == 0, "select 1 passes east oscillator");
    right_osc = 1; right_phase = 1;
    #1;
    check(sel_osc_out == 1 && sel_phase_out == 1, "east signals passed");
    msel_enable = 0;
    #1;
    check(msel_out == 0 && sel_osc_out == 1 && sel_phase_out == 0,
          "select gated off by msel_enable: own oscillator, phase not yet sampled");
    // ---- phase sampling: captured on the third edge after sample_phase ----
    phase_in = 1;
    sample_phase = 1;
    @(negedge clk);
    sample_phase = 0;
    check(sel_phase_out == 0, "phase not captured after 1 edge");
    @(negedge clk);
    check(sel_phase_out == 0, "phase not captured after 2 edges");
    @(negedge clk);
    check(sel_phase_out == 1, "phase captured after 3 edges");
    phase_in = 0;
    repeat (3) @(negedge clk);
    check(sel_phase_out == 1, "phase held until next sample");
    // ---- reset ----
    cfg_shift_en = 1; cfg_write_in = 1;
    @(negedge clk);
    cfg_shift_en = 0;
    rst = 1;
    @(negedge clk);
    rst = 0;
    msel_enable = 1;
    #1;
    check(cfg_bits == '0 && sel_phase_out == 0 && msel_out == 0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
