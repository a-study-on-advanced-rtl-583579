// tb_fpim_top_full: one complete run of host commands on the FPIM digital top at its full
// size (29 x 9 oscillator tiles, 40998-bit rows, 11280-bit north row), driven
// through the UART pins. It switches the link from the reset rate (260 clk
// cycles per bit) to 4 cycles per bit, programs oscillator row 0 and the north
// row (29) with random data and checks every register bit, reads both rows
// back, reads three oscillator frequencies and all 261 phases, then enables,
// disables and resets the configuration.
module tb_fpim_top_full;
  localparam int OR = 29, OPR = 9, CT = 4422, CE = 1200, CN = 1200, CNE = 480;
  localparam int RB = OPR * CT + CE, NRB = OPR * CN + CNE;

  logic clk = 0, rst_n = 0;
  logic uart_rx, uart_tx, cfg_enable;
  logic [CT-1:0]  tile_cfg [OR][OPR];
  logic [CE-1:0]  east_cfg [OR];
  logic [CN-1:0]  north_cfg [OPR];
  logic [CNE-1:0] north_east_cfg;
  logic [OR-1:0][OPR-1:0] osc_in = '0, phase_in = '0;
  int checks = 0, failures = 0;

  fpim_top dut (.*);

  uart_host host (.clk, .txd(uart_rx), .rxd(uart_tx));

  always #5 clk = ~clk;

  function automatic int period(input int r, input int c);
    return 3 + (r * OPR + c) % 13;
  endfunction

  int osc_t [OR][OPR];
  always @(posedge clk)
    for (int r = 0; r < OR; r++)
      for (int c = 0; c < OPR; c++) begin
        osc_t[r][c] = (osc_t[r][c] + 1) % period(r, c);
        osc_in[r][c] <= osc_t[r][c] < period(r, c) / 2;
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

  logic [RB-1:0] golden [2];
  int rows [2] = '{0, OR};

  initial begin
    int unsigned echo, cnt;
    byte unsigned ack, data[$], resp[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    host.cpb = 260;
    host.cmd_init(4, echo);
    check(echo == 4, "init echo");
    // ---- program row 0 and the north row ----
    foreach (rows[k]) begin
      data = {};
      for (int i = 0; i < (row_len(rows[k]) + 7) / 8; i++) data.push_back(byte'($urandom));
      golden[k] = bytes_to_bits(data, row_len(rows[k]));
      host.cmd_program(rows[k], data, ack);
      check(ack == 0, "program ack");
      check(row_value(rows[k]) == golden[k], $sformatf("row %0d programmed", rows[k]));
    end
    check(row_value(1) == '0, "row 1 untouched");
    // ---- read them back ----
    foreach (rows[k]) begin
      host.cmd_read_config(rows[k], (row_len(rows[k]) + 7) / 8, resp);
      check(resp.size() == (row_len(rows[k]) + 7) / 8, "read reply length");
      check(bytes_to_bits(resp, row_len(rows[k])) == golden[k], $sformatf("read row %0d", rows[k]));
      check(row_value(rows[k]) == golden[k], "row restored after read");
      check(!cfg_enable, "enable off after read");
    end
    // ---- frequencies ----
    for (int k = 0; k < 3; k++) begin
      int r, c, p;
      r = k == 0 ? 0 : (k == 1 ? OR - 1 : 13);
      c = k == 0 ? 0 : (k == 1 ? OPR - 1 : 4);
      p = period(r, c);
      host.cmd_read_freq(r, c, 10, cnt);
      check(int'(cnt) >= 1024 / p && int'(cnt) <= (1024 + p - 1) / p,
            $sformatf("freq (%0d,%0d) = %0d, want ~%0d", r, c, cnt, 1024 / p));
    end
    // ---- phases ----
    for (int r = 0; r < OR; r++) phase_in[r] = OPR'($urandom);
    host.cmd_read_phase((OR * OPR + 7) / 8, resp);
    check(resp.size() == 33, "phase reply is 33 bytes");
    for (int r = 0; r < OR; r++)
      for (int c = 0; c < OPR; c++)
        check(resp[(r * OPR + c) / 8][(r * OPR + c) % 8] == phase_in[r][c],
              $sformatf("phase (%0d,%0d)", r, c));
    // ---- enable, disable, reset ----
    host.cmd_enable(1, ack);
    check(ack == 0 && cfg_enable, "enable");
    host.cmd_enable(0, ack);
    check(ack == 0 && !cfg_enable, "disable");
    host.cmd_reset(ack);
    check(ack == 0 && row_value(0) == '0 && row_value(OR) == '0, "reset clears the rows");
    check(!host.timed_out && host.rx_errors == 0, "every reply arrived, well framed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
