// tb_fpim_freq_counter: feeds square waves of known period into the
// frequency counter and checks that the count of oscillator cycles in a
// window of 2^cal clk cycles is within one of 2^cal/period, that busy lasts
// exactly 2^cal cycles, and that the count saturates at 2^20-1.
module tb_fpim_freq_counter;
  logic        clk = 0, rst_n = 0;
  logic        start = 0, osc = 0, busy, done;
  logic [4:0]  cal;
  logic [19:0] count;
  int checks = 0, failures = 0;
  int period = 4;   // oscillator period in clk cycles (>= 2)
  int phase_cnt = 0;

  fpim_freq_counter dut (.clk, .rst_n, .start, .cal, .osc, .busy, .done, .count);

  always #5 clk = ~clk;

  // oscillator: high for period/2 cycles, low for the rest
  always @(posedge clk) begin
    phase_cnt = (phase_cnt + 1) % period;
    osc <= (phase_cnt < period / 2);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int p, input int c);
    longint expect_n, busy_cycles;
    period = p;
    cal = 5'(c);
    repeat (3 * p) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    busy_cycles = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      @(negedge clk);
    end
    expect_n = (longint'(1) << c) / p;
    if (expect_n > 20'hFFFFF) begin
      check(count == 20'hFFFFF, $sformatf("saturated count %0d", count));
    end else begin
      check(longint'(count) >= expect_n - 1 && longint'(count) <= expect_n + 1,
            $sformatf("p=%0d cal=%0d count=%0d expect~%0d", p, c, count, expect_n));
    end
    check(busy_cycles == (longint'(1) << c), $sformatf("window %0d cycles, want %0d", busy_cycles, longint'(1) << c));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(4, 8);
    measure(4, 12);
    measure(10, 10);
    measure(7, 14);
    measure(3, 9);
    measure(2, 6);
    measure(100, 0);
    measure(2, 22);   // 2^21 oscillator cycles: saturates
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
