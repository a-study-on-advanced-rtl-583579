// uart_rx: 8N1 UART receiver with a bit period set at run time.
//
// The serial line is brought into the clock domain through two flip-flops.
// A falling edge on the idle-high line starts a frame; the start bit is
// re-checked half a bit period later, then the eight data bits (least
// significant first) are sampled one bit period apart, each in the middle of
// its bit. The stop bit is sampled as well: a frame whose stop bit is low is
// dropped and flagged on frame_err for one cycle, and the receiver then
// waits for the line to return high before looking for the next start bit.
//
// Interface: cycles_per_bit is the number of clk cycles per UART bit (the
// chip starts at 260, i.e. 19200 baud from a 5 MHz clock); it must be at
// least 4 and must not change during a frame. valid pulses for one cycle with
// the received byte on data, in the cycle after the middle of the stop bit.
//
// The controller's use of a UART with a programmable bit rate is the chip's;
// 8N1 framing and mid-bit sampling are choices of this implementation.
module uart_rx
  import fpim_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W_CPB-1:0] cycles_per_bit,
  input  logic             rx,
  output logic             valid,
  output logic [7:0]       data,
  output logic             frame_err
);

  typedef enum logic [2:0] {IDLE, START, DATA, STOP, BREAK} state_e;

  state_e           state;
  logic [1:0]       sync;
  logic [W_CPB-1:0] cnt;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;

  wire rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!rx_s) begin
          state <= START;
          cnt   <= (cycles_per_bit >> 1) - 1'b1;
        end
        START: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else if (rx_s) state <= IDLE;          // glitch, not a start bit
          else begin
            state   <= DATA;
            cnt     <= cycles_per_bit - 1'b1;
            bit_idx <= '0;
          end
        end
        DATA: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            shreg   <= {rx_s, shreg[7:1]};
            cnt     <= cycles_per_bit - 1'b1;
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= STOP;
          end
        end
        STOP: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            state <= IDLE;
            if (rx_s) begin
              valid <= 1'b1;
              data  <= shreg;
            end else begin
              frame_err <= 1'b1;
              state     <= BREAK;
            end
          end
        end
        BREAK: if (rx_s) state <= IDLE;   // wait for the line to return high
        default: state <= IDLE;
      endcase
    end
  end

endmodule
