// fpim_freq_counter: measures the frequency of one oscillator signal.
//
// On start, the counter opens a window of 2^cal clk cycles (cal is the
// "frequency calculation granularity" field of the read-frequency command)
// and counts the rising edges of osc seen during that window. The result,
// the number of oscillator cycles per 2^cal chip-clock cycles, appears on
// count with done pulsing for one cycle when the window closes; count holds
// its value until the next start. The count saturates at 2^W_COUNT-1.
//
// The oscillator signal is asynchronous to clk. It is brought in through two
// flip-flops and its rising edges are detected in the clk domain, so this
// counter is exact only for oscillator signals below half the clk frequency
// (the selected oscillator is assumed to arrive already divided down to that
// range). start is ignored while a measurement is running (busy high).
//
// The 20-bit count and the 2^granularity window follow the chip's command
// description; the synchronise-and-count method is a choice of this
// implementation.
module fpim_freq_counter #(
  parameter int W_COUNT = 20,
  parameter int W_CAL   = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [W_CAL-1:0]   cal,
  input  logic               osc,
  output logic               busy,
  output logic               done,
  output logic [W_COUNT-1:0] count
);

  localparam int W_WIN = (1 << W_CAL) + 1;

  logic [2:0]       osc_sync;   // two synchroniser stages plus edge history
  logic [W_WIN-1:0] win;
  logic             rise;

  assign rise = osc_sync[1] & ~osc_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      osc_sync <= '0;
      win      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      count    <= '0;
    end else begin
      osc_sync <= {osc_sync[1:0], osc};
      done     <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          win   <= W_WIN'(1) << cal;
          count <= '0;
        end
      end else begin
        if (rise && count != '1) count <= count + 1'b1;
        win <= win - 1'b1;
        if (win == W_WIN'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
