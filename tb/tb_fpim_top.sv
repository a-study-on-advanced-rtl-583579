// tb_fpim_top: end-to-end test of the FPIM digital top at a scaled size
// (3 oscillator rows of 4 tiles plus the north row), driven only through the
// UART pins, following the chip's own verification flow: set the bit rate,
// read the frequency of every oscillator against the frequency forced on it,
// read random phases several times, program every row with random golden
// data and compare the registers bit by bit, read every row back, then
// enable, disable and reset the configuration.
//
// It also counts how often each mechanism of the design happened, observed
// on the controller/array interface, and fails for any that never did: bit
// rate switch, mux-select shifting, frequency window, phase sampling, row
// programming, dropping of padding bits, ring read-back (row restored),
// configuration enable and disable, enable cleared by a read, reset command.
module tb_fpim_top;
  localparam int OR = 3, OPR = 4, CT = 9, CE = 7, CN = 5, CNE = 4;
  localparam int NR = OR + 1;
  localparam int RB = OPR * CT + CE, NRB = OPR * CN + CNE;

  logic clk = 0, rst_n = 0;
  logic uart_rx, uart_tx, cfg_enable;
  logic [CT-1:0]  tile_cfg [OR][OPR];
  logic [CE-1:0]  east_cfg [OR];
  logic [CN-1:0]  north_cfg [OPR];
  logic [CNE-1:0] north_east_cfg;
  logic [OR-1:0][OPR-1:0] osc_in = '0, phase_in = '0;
  int checks = 0, failures = 0;

  fpim_top #(.OSC_ROWS(OR), .OSC_PER_ROW(OPR), .CFG_BITS_TILE(CT), .CFG_BITS_EAST(CE),
             .CFG_BITS_NORTH(CN), .CFG_BITS_NE(CNE)) dut (.*);

  uart_host host (.clk, .txd(uart_rx), .rxd(uart_tx));

  always #5 clk = ~clk;

  // forced oscillator frequencies: period 3 + r*OPR + c clk cycles
  int osc_t [OR][OPR];
  always @(posedge clk)
    for (int r = 0; r < OR; r++)
      for (int c = 0; c < OPR; c++) begin
        osc_t[r][c] = (osc_t[r][c] + 1) % (3 + r * OPR + c);
        osc_in[r][c] <= osc_t[r][c] < (3 + r * OPR + c) / 2;
      end

  // ---- mechanism counters ----
  int n_rate = 0, n_msel = 0, n_window = 0, n_sample = 0, n_prog = 0, n_pad = 0;
  int n_ring = 0, n_en = 0, n_dis = 0, n_rd_off = 0, n_reset = 0;
  logic en_q = 0;
  logic [8:0] cpb_q = 9'd260;
  always @(posedge clk) begin
    if (dut.u_ctrl.cpb != cpb_q) n_rate++;
    cpb_q <= dut.u_ctrl.cpb;
    if (dut.msel_shift_en) n_msel++;
    if (dut.u_ctrl.fc_done) n_window++;
    if (dut.sample_phase) n_sample++;
    if (dut.array_rst) n_reset++;
    en_q <= cfg_enable;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int row_len(input int r);
    return r < OR ? RB : NRB;
  endfunction

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

  function automatic logic [RB-1:0] bytes_to_bits(input byte unsigned q[$], input int n);
    logic [RB-1:0] v = '0;
    for (int i = 0; i < n; i++) v[i] = q[i / 8][i % 8];
    return v;
  endfunction

  logic [RB-1:0] golden [NR];

  initial begin
    int unsigned echo, cnt;
    byte unsigned ack, data[$], resp[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- initialisation at the reset rate ----
    host.cpb = 260;
    host.cmd_init(5, echo);
    check(echo == 5, "init echo");
    // ---- frequency reading ----
    for (int r = 0; r < OR; r++)
      for (int c = 0; c < OPR; c++) begin
        int p;
        p = 3 + r * OPR + c;
        host.cmd_read_freq(r, c, 11, cnt);
        check(int'(cnt) >= 2048 / p && int'(cnt) <= (2048 + p - 1) / p,
              $sformatf("freq (%0d,%0d) = %0d, want ~%0d", r, c, cnt, 2048 / p));
      end
    // ---- phase reading ----
    for (int k = 0; k < 4; k++) begin
      phase_in = (OR * OPR)'({$urandom, $urandom});
      host.cmd_read_phase((OR * OPR + 7) / 8, resp);
      for (int r = 0; r < OR; r++)
        for (int c = 0; c < OPR; c++)
          check(resp[(r * OPR + c) / 8][(r * OPR + c) % 8] == phase_in[r][c],
                $sformatf("phase (%0d,%0d)", r, c));
    end
    // ---- configuration programming ----
    for (int r = 0; r < NR; r++) begin
      data = {};
      for (int i = 0; i < (row_len(r) + 7) / 8; i++) data.push_back(byte'($urandom));
      golden[r] = bytes_to_bits(data, row_len(r));
      host.cmd_program(r, data, ack);
      check(ack == 0, "program ack");
      check(row_value(r) == golden[r], $sformatf("row %0d programmed", r));
      n_prog++;
      if (row_len(r) % 8 != 0 && (data[data.size() - 1] >> (row_len(r) % 8)) != 0) n_pad++;
    end
    for (int r = 0; r < NR; r++)
      check(row_value(r) == golden[r], $sformatf("row %0d intact after all programming", r));
    // ---- configuration reading ----
    host.cmd_enable(1, ack);
    for (int r = 0; r < NR; r++) begin
      host.cmd_read_config(r, (row_len(r) + 7) / 8, resp);
      check(bytes_to_bits(resp, row_len(r)) == golden[r], $sformatf("read row %0d", r));
      if (row_value(r) == golden[r]) n_ring++;
      check(row_value(r) == golden[r], "row restored after read");
      if (!cfg_enable) n_rd_off++;
      check(!cfg_enable, "enable off after read");
    end
    // ---- enable / disable / reset ----
    host.cmd_enable(1, ack);
    check(ack == 0 && cfg_enable, "enable");
    if (cfg_enable) n_en++;
    host.cmd_enable(0, ack);
    check(ack == 0 && !cfg_enable, "disable");
    if (!cfg_enable) n_dis++;
    host.cmd_reset(ack);
    check(ack == 0, "reset ack");
    for (int r = 0; r < NR; r++) check(row_value(r) == '0, $sformatf("row %0d zero after reset", r));
    check(!host.timed_out && host.rx_errors == 0, "every reply arrived, well framed");
    // ---- every mechanism happened ----
    check(n_rate > 0,   "bit rate switch happened");
    check(n_msel > 0,   "mux-select shifting happened");
    check(n_window > 0, "frequency window happened");
    check(n_sample > 0, "phase sampling happened");
    check(n_prog > 0,   "row programming happened");
    check(n_pad > 0,    "padding bits dropped");
    check(n_ring > 0,   "ring read-back restored a row");
    check(n_en > 0,     "configuration enabled");
    check(n_dis > 0,    "configuration disabled");
    check(n_rd_off > 0, "read cleared the enable");
    check(n_reset > 0,  "reset command reached the array");
    $display("mechanisms: rate=%0d msel=%0d window=%0d sample=%0d prog=%0d pad=%0d ring=%0d en=%0d dis=%0d rd_off=%0d reset=%0d",
             n_rate, n_msel, n_window, n_sample, n_prog, n_pad, n_ring, n_en, n_dis, n_rd_off, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
