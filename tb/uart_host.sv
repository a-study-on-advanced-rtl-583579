// uart_host: testbench model of the host side of an 8N1 UART link.
//
// send_byte() drives one frame on txd, bits held for cpb clk cycles.
// A free-running receiver watches rxd, samples each bit in its middle and
// pushes every received byte into rx_q (frames with a low stop bit bump
// rx_errors instead). recv_byte() pops the oldest byte, waiting at most
// max_wait clk cycles for it; on timeout it returns 0 and sets timed_out.
// cpb is a variable so a test can follow a bit-rate change.
//
// The cmd_* tasks wrap the FPIM controller's commands: each sends one
// command (and its data), collects the reply bytes and returns them.
module uart_host (
  input  logic clk,
  output logic txd,
  input  logic rxd
);
  int unsigned cpb = 260;
  byte unsigned rx_q[$];
  int unsigned rx_errors = 0;
  bit timed_out = 0;

  initial txd = 1'b1;

  task automatic send_byte(input byte unsigned b);
    txd = 1'b0;
    repeat (cpb) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      txd = b[i];
      repeat (cpb) @(posedge clk);
    end
    txd = 1'b1;
    repeat (cpb) @(posedge clk);
  endtask

  task automatic recv_byte(output byte unsigned b, input int unsigned max_wait = 2000000);
    int unsigned n = 0;
    while (rx_q.size() == 0 && n < max_wait) begin
      @(posedge clk);
      n++;
    end
    if (rx_q.size() == 0) begin
      timed_out = 1;
      b = 0;
    end else begin
      b = rx_q.pop_front();
    end
  endtask

  // ---- FPIM controller commands ----
  task automatic recv_n(input int n, output byte unsigned r[$]);
    byte unsigned b;
    r = {};
    for (int i = 0; i < n; i++) begin
      recv_byte(b);
      r.push_back(b);
    end
  endtask

  // init: send the new cycles-per-bit, read the echo at the old rate, let
  // the echo's stop bit end (one old bit period) and switch
  task automatic cmd_init(input int unsigned new_cpb, output int unsigned echo);
    byte unsigned r[$];
    send_byte(byte'(new_cpb & 8'hFF));
    send_byte(byte'(new_cpb >> 8));
    recv_n(2, r);
    echo = {r[1], r[0]};
    repeat (cpb) @(posedge clk);
    cpb = new_cpb;
  endtask

  task automatic cmd_read_freq(input int row, input int col, input int cal, output int unsigned count);
    byte unsigned r[$];
    send_byte(byte'({cal[4:0], 3'b001}));
    send_byte(byte'(col[3:0]));
    send_byte(byte'(row[4:0]));
    recv_n(3, r);
    count = {r[2], r[1], r[0]};
  endtask

  task automatic cmd_read_phase(input int nbytes, output byte unsigned r[$]);
    send_byte(8'b010);
    recv_n(nbytes, r);
  endtask

  task automatic cmd_program(input int row, input byte unsigned data[$], output byte unsigned ack);
    send_byte(byte'({row[4:0], 3'b101}));
    foreach (data[i]) send_byte(data[i]);
    recv_byte(ack);
  endtask

  task automatic cmd_read_config(input int row, input int nbytes, output byte unsigned r[$]);
    send_byte(byte'({row[4:0], 3'b110}));
    recv_n(nbytes, r);
  endtask

  task automatic cmd_enable(input bit en, output byte unsigned ack);
    send_byte(byte'({4'b0, en, 3'b100}));
    recv_byte(ack);
  endtask

  task automatic cmd_reset(output byte unsigned ack);
    send_byte(8'b111);
    recv_byte(ack);
  endtask

  // background receiver
  initial begin
    byte unsigned b;
    forever begin
      @(posedge clk);
      if (rxd === 1'b0) begin
        repeat (cpb / 2) @(posedge clk);
        if (rxd === 1'b0) begin
          for (int i = 0; i < 8; i++) begin
            repeat (cpb) @(posedge clk);
            b[i] = rxd;
          end
          repeat (cpb) @(posedge clk);
          if (rxd === 1'b1) rx_q.push_back(b);
          else rx_errors++;
        end
      end
    end
  end
endmodule
