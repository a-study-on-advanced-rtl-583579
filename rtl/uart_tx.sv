// uart_tx: 8N1 UART transmitter with a bit period set at run time.
//
// A byte offered with start while ready is high is sent as one start bit
// (low), eight data bits least significant first, and one stop bit (high),
// each held for cycles_per_bit clk cycles. ready is low from the cycle after
// start until the stop bit has been held for its full period; the line idles
// high.
//
// Interface: start/data form a ready/valid handshake (start is ignored while
// ready is low). cycles_per_bit must be at least 1 and must not change while
// a byte is being sent. A byte occupies the line for 10*cycles_per_bit cycles.
//
// The UART link is the chip's; 8N1 framing is a choice of this implementation.
module uart_tx
  import fpim_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W_CPB-1:0] cycles_per_bit,
  input  logic             start,
  input  logic [7:0]       data,
  output logic             ready,
  output logic             tx
);

  logic             busy;
  logic [W_CPB-1:0] cnt;
  logic [3:0]       bit_idx;   // 0 = start bit, 1..8 = data, 9 = stop bit
  logic [9:0]       frame;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
      tx      <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        busy    <= 1'b1;
        frame   <= {1'b1, data, 1'b0};
        tx      <= 1'b0;
        cnt     <= cycles_per_bit - 1'b1;
        bit_idx <= '0;
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else if (bit_idx == 4'd9) begin
      busy <= 1'b0;
      tx   <= 1'b1;
    end else begin
      bit_idx <= bit_idx + 1'b1;
      tx      <= frame[bit_idx + 1'b1];
      cnt     <= cycles_per_bit - 1'b1;
    end
  end

endmodule
