// tb_fpim_controller: exercises the FPIM controller over its UART, with a
// scaled tile array (2 oscillator rows of 3 tiles plus the north row) and a
// square-wave source of a different period on every oscillator.
//
// Checked: the init echo and the switch to the new bit rate; that NOP and
// the unused code 011 get no reply; programming every row (including the
// north row, whose length differs) with random padding bits that must be
// dropped; read-back of every row, zero padding in the reply, the row left
// unchanged and cfg_enable left low; enable and disable; frequency of every
// oscillator equal to the number of whole or started periods in 2^g cycles; the phase of every oscillator
// in its reply bit; a row index beyond the array changing nothing; reset.
module tb_fpim_controller;
  localparam int OR = 2, OPR = 3, CT = 6, CE = 5, CN = 4, CNE = 3;
  localparam int NR = OR + 1, NC = OPR + 1;
  localparam int RB = OPR * CT + CE, NRB = OPR * CN + CNE;

  logic clk = 0, rst_n = 0;
  logic uart_rx, uart_tx;
  logic array_rst, cfg_write_in, cfg_enable;
  logic [NR-1:0] row_shift_en, row_read_sel, cfg_read_out;
  logic msel_in, msel_shift_en, msel_enable, sample_phase;
  logic [OR-1:0] sel_osc_out, sel_phase_out;
  logic [CT-1:0]  tile_cfg [OR][OPR];
  logic [CE-1:0]  east_cfg [OR];
  logic [CN-1:0]  north_cfg [OPR];
  logic [CNE-1:0] north_east_cfg;
  logic [OR-1:0][OPR-1:0] osc_in = '0, phase_in = '0;
  int checks = 0, failures = 0;

  fpim_controller #(.OSC_ROWS(OR), .OSC_PER_ROW(OPR), .CFG_BITS_TILE(CT), .CFG_BITS_EAST(CE),
                    .CFG_BITS_NORTH(CN), .CFG_BITS_NE(CNE), .CPB_RESET(20)) dut (
    .clk, .rst_n, .uart_rx_i(uart_rx), .uart_tx_o(uart_tx),
    .array_rst, .row_shift_en, .cfg_write_in, .row_read_sel, .cfg_enable, .cfg_read_out,
    .msel_in, .msel_shift_en, .msel_enable, .sample_phase, .sel_osc_out, .sel_phase_out
  );

  fpim_tile_array #(.OSC_ROWS(OR), .OSC_PER_ROW(OPR), .CFG_BITS_TILE(CT),
                    .CFG_BITS_EAST(CE), .CFG_BITS_NORTH(CN), .CFG_BITS_NE(CNE)) u_array (
    .clk, .rst(array_rst | ~rst_n),
    .row_shift_en, .cfg_write_in, .row_read_sel, .cfg_enable, .cfg_read_out,
    .tile_cfg, .east_cfg, .north_cfg, .north_east_cfg,
    .msel_in, .msel_shift_en, .msel_enable, .sample_phase,
    .osc_in, .phase_in, .sel_osc_out, .sel_phase_out
  );

  uart_host host (.clk, .txd(uart_rx), .rxd(uart_tx));

  always #5 clk = ~clk;

  // oscillator (r,c) has a period of 3 + r*OPR + c clk cycles
  int osc_t [OR][OPR];
  always @(posedge clk)
    for (int r = 0; r < OR; r++)
      for (int c = 0; c < OPR; c++) begin
        osc_t[r][c] = (osc_t[r][c] + 1) % (3 + r * OPR + c);
        osc_in[r][c] <= osc_t[r][c] < (3 + r * OPR + c) / 2;
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
    host.cpb = 20;
    // ---- init ----
    host.cmd_init(6, echo);
    check(echo == 6, $sformatf("init echo %0d", echo));
    // ---- codes without a reply ----
    host.send_byte(8'h00);
    host.send_byte(8'h03);
    repeat (300) @(negedge clk);
    check(host.rx_q.size() == 0, "no reply to NOP / unused code");
    // ---- program every row ----
    for (int r = 0; r < NR; r++) begin
      data = {};
      for (int i = 0; i < (row_len(r) + 7) / 8; i++) data.push_back(byte'($urandom));
      golden[r] = bytes_to_bits(data, row_len(r));
      host.cmd_program(r, data, ack);
      check(ack == 0, "program ack");
    end
    for (int r = 0; r < NR; r++)
      check(row_value(r) == golden[r], $sformatf("row %0d = %h want %h", r, row_value(r), golden[r]));
    // ---- read every row ----
    for (int r = 0; r < NR; r++) begin
      host.cmd_read_config(r, (row_len(r) + 7) / 8, resp);
      check(bytes_to_bits(resp, row_len(r)) == golden[r], $sformatf("read row %0d", r));
      check((resp[resp.size() - 1] >> (row_len(r) % 8)) == 0 || row_len(r) % 8 == 0, "reply padding zero");
      check(row_value(r) == golden[r], "row unchanged by read");
      check(cfg_enable == 0, "read leaves cfg_enable low");
    end
    // ---- enable / disable ----
    host.cmd_enable(1, ack);
    check(ack == 0 && cfg_enable == 1, "enable");
    host.cmd_enable(0, ack);
    check(ack == 0 && cfg_enable == 0, "disable");
    // ---- frequency of every oscillator ----
    for (int r = 0; r < OR; r++)
      for (int c = 0; c < OPR; c++) begin
        int p;
        p = 3 + r * OPR + c;
        host.cmd_read_freq(r, c, 10, cnt);
        check(int'(cnt) >= 1024 / p && int'(cnt) <= (1024 + p - 1) / p,
              $sformatf("freq (%0d,%0d) = %0d, want ~%0d", r, c, cnt, 1024 / p));
      end
    // ---- phase ----
    for (int k = 0; k < 3; k++) begin
      phase_in = (OR * OPR)'($urandom);
      host.cmd_read_phase((OR * OPR + 7) / 8, resp);
      for (int r = 0; r < OR; r++)
        for (int c = 0; c < OPR; c++)
          check(resp[(r * OPR + c) / 8][(r * OPR + c) % 8] == phase_in[r][c],
                $sformatf("phase (%0d,%0d)", r, c));
    end
    // ---- a row beyond the array changes nothing ----
    data = {};
    for (int i = 0; i < (RB + 7) / 8; i++) data.push_back(8'hFF);
    host.cmd_program(9, data, ack);
    check(ack == 0, "ack for out-of-range row");
    for (int r = 0; r < NR; r++) check(row_value(r) == golden[r], "out-of-range row ignored");
    // ---- reset ----
    host.cmd_reset(ack);
    check(ack == 0, "reset ack");
    for (int r = 0; r < NR; r++) check(row_value(r) == '0, $sformatf("row %0d cleared", r));
    check(!host.timed_out && host.rx_errors == 0, "every reply arrived, well framed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
