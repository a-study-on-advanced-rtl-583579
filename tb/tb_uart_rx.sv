// tb_uart_rx: drives 8N1 frames into the UART receiver at several bit
// periods and checks the received bytes, that valid arrives once per frame
// within four cycles of the frame's end, and that a frame with a low stop
// bit is flagged on frame_err and not delivered.
module tb_uart_rx;
  logic       clk = 0, rst_n = 0;
  logic [8:0] cpb = 9'd8;
  logic       rx = 1, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last;

  uart_rx dut (.clk, .rst_n, .cycles_per_bit(cpb), .rx, .valid, .data, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (valid) begin n_valid++; last = data; end
    if (frame_err) n_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic frame(input logic [7:0] b, input int p, input bit stop);
    rx = 0;
    repeat (p) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (p) @(negedge clk);
    end
    rx = stop;
    repeat (p) @(negedge clk);
    rx = 1;
  endtask

  task automatic good(input logic [7:0] b, input int p);
    int v0 = n_valid;
    cpb = 9'(p);
    frame(b, p, 1'b1);
    // the stop bit is sampled in its middle, behind a two-stage
    // synchroniser: the byte must be out within 4 cycles of the frame's end
    repeat (4) @(negedge clk);
    check(n_valid == v0 + 1, $sformatf("one valid for %02x (got %0d)", b, n_valid - v0));
    check(last == b, $sformatf("data %02x got %02x", b, last));
    repeat (p) @(negedge clk);
    check(n_valid == v0 + 1, "no extra byte");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    good(8'h55, 8);
    good(8'h00, 8);
    good(8'hFF, 4);
    good(8'h81, 260);
    for (int k = 0; k < 30; k++) good(8'($urandom), 4 + ($urandom % 20));
    begin
      int v0, e0;
      v0 = n_valid;
      e0 = n_err;
      cpb = 9'd10;
      frame(8'h12, 10, 1'b0);
      repeat (30) @(negedge clk);
      check(n_valid == v0, $sformatf("no byte from a bad frame (%0d, last %02x)", n_valid - v0, last));
      check(n_err == e0 + 1, "frame error flagged");
    end
    good(8'h6B, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
