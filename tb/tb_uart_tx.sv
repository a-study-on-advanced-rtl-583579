// tb_uart_tx: checks the UART transmitter's framing, bit timing and
// ready/start handshake. Each byte is decoded from the line by sampling in
// the middle of every bit; the start-bit edge and the return of ready are
// timed against 10 bit periods.
module tb_uart_tx;
  logic       clk = 0, rst_n = 0;
  logic [8:0] cpb;
  logic       start = 0, ready, tx;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;

  uart_tx dut (.clk, .rst_n, .cycles_per_bit(cpb), .start, .data, .ready, .tx);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_and_check(input logic [7:0] b, input int p);
    logic [7:0] got;
    int t_busy;
    cpb = 9'(p);
    @(negedge clk);
    check(ready === 1'b1, "ready before start");
    data  = b;
    start = 1;
    @(negedge clk);
    start = 0;
    check(ready === 1'b0, "ready drops after start");
    // tx went low at the clock edge that took the byte; now 1 cycle in
    check(tx === 1'b0, "start bit");
    // middle of start bit is p/2 cycles after its start
    repeat (p / 2 - 1) @(negedge clk);
    check(tx === 1'b0, "start bit middle");
    for (int i = 0; i < 8; i++) begin
      repeat (p) @(negedge clk);
      got[i] = tx;
    end
    repeat (p) @(negedge clk);
    check(tx === 1'b1, "stop bit");
    check(got == b, $sformatf("data %02x got %02x", b, got));
    // ready returns after exactly 10 bit periods
    t_busy = 1 + p / 2 - 1 + 9 * p;
    while (!ready) begin
      @(negedge clk);
      t_busy++;
    end
    check(t_busy == 10 * p + 1, $sformatf("frame length %0d cycles, want %0d", t_busy, 10 * p + 1));
  endtask

  initial begin
    cpb = 9'd8;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(tx === 1'b1, "idle high");
    send_and_check(8'hA5, 8);
    send_and_check(8'h00, 8);
    send_and_check(8'hFF, 5);
    send_and_check(8'h3C, 16);
    for (int k = 0; k < 20; k++) send_and_check(8'($urandom), 4 + 2 * ($urandom % 6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
