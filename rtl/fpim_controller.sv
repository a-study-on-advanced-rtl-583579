// fpim_controller: top-level controller of the FPIM chip.
//
// A host talks to the controller over a UART. After reset the controller
// expects the two-byte "init" command, the new UART clock cycles per bit
// (9 bits, low byte first), echoes it back at the old rate and then switches
// to the new rate (the reset rate is CPB_RESET = 260 cycles per bit). From
// then on every command starts with a byte whose bits [2:0] give its type:
//
//   001 read frequency  3 command bytes: [7:3] granularity g, [11:8] column,
//                       [20:16] row. Reply: 3 bytes, the number of cycles of
//                       that oscillator during 2^g clk cycles (20 bits).
//   010 read phase      1 byte. Reply: ceil(NUM_OSC/8) bytes, bit
//                       row*OSC_PER_ROW+column is that oscillator's phase.
//   101 program config  1 byte, [7:3] row, followed by the row's bits (low
//                       bit of the first byte first, padded to whole bytes).
//                       Reply: one 0x00 byte.
//   110 read config     1 byte, [7:3] row. Reply: the row's bits in the same
//                       format. Leaves cfg_enable low.
//   100 enable config   1 byte, bit 3 = 1 enable / 0 disable. Reply 0x00.
//   111 reset           1 byte, clears every configuration register. Reply 0x00.
//   000, 011            ignored.
//
// Configuration streaming: programming shifts each received byte's bits,
// one per clk cycle, into the selected row (row_shift_en[row] high for one
// cycle per bit) until the row's bit count is reached; the padding bits of
// the last byte are dropped. Reading raises cfg_enable, then shifts the row
// and its read-back stages together for ROW_BITS + NUM_COLS cycles, feeding
// every bit that comes out on cfg_read_out[row] straight back into
// cfg_write_in. The chain and the read-back stages form one ring, so after
// the full count the row holds exactly what it held before; the first
// NUM_COLS bits out are the old read-back stages and are dropped, the rest
// are the row's bits, least significant first. Shifting pauses after every
// 8 bits until the UART transmitter takes the byte.
//
// Oscillator selection: to pick column c the controller shifts OSC_PER_ROW
// bits into the shared mux-select chain so that tiles 0..c-1 pass the signal
// from the east and tile c uses its own oscillator. A frequency read keeps
// that selection while fpim_freq_counter counts the selected row's signal,
// opening the window three cycles after the selection settles. A
// phase read pulses sample_phase, then selects each column in turn and
// collects one bit per oscillator row.
//
// The command set, codes, field positions, reply lengths, reset rate, the
// single write wire plus per-row read wires, and "read config leaves the
// enable off" are the chip's. Byte order, the ring-shaped (non-destructive)
// read, ignoring unknown codes, the echo at the old rate and the exact
// sequencing are choices of this implementation.
module fpim_controller
  import fpim_pkg::W_CPB, fpim_pkg::W_CMD, fpim_pkg::W_CMD_TYPE, fpim_pkg::W_FREQ_COUNTER,
         fpim_pkg::W_FREQ_CAL, fpim_pkg::W_OSC_COL_ID, fpim_pkg::W_OSC_ROW_ID,
         fpim_pkg::W_CFG_ROW_IDX, fpim_pkg::FLD_CFG_ROW_LSB, fpim_pkg::FLD_FRQ_CAL_LSB,
         fpim_pkg::FLD_OSC_COL_LSB, fpim_pkg::FLD_OSC_ROW_LSB, fpim_pkg::FLD_ENABLE_BIT,
         fpim_pkg::cmd_e, fpim_pkg::CMD_READ_FREQ, fpim_pkg::CMD_READ_PHASE,
         fpim_pkg::CMD_PRGM_CONFIG, fpim_pkg::CMD_READ_CONFIG, fpim_pkg::CMD_ENABLE_CONFIG,
         fpim_pkg::CMD_RESET;
#(
  parameter int OSC_ROWS       = 29,
  parameter int OSC_PER_ROW    = 9,
  parameter int CFG_BITS_TILE  = 4422,
  parameter int CFG_BITS_EAST  = 1200,
  parameter int CFG_BITS_NORTH = 1200,
  parameter int CFG_BITS_NE    = 480,
  parameter int CPB_RESET      = 260,
  localparam int NUM_ROWS      = OSC_ROWS + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host link
  input  logic                  uart_rx_i,
  output logic                  uart_tx_o,
  // tile array: configuration streaming
  output logic                  array_rst,
  output logic [NUM_ROWS-1:0]   row_shift_en,
  output logic                  cfg_write_in,
  output logic [NUM_ROWS-1:0]   row_read_sel,
  output logic                  cfg_enable,
  input  logic [NUM_ROWS-1:0]   cfg_read_out,
  // tile array: oscillator / phase selection
  output logic                  msel_in,
  output logic                  msel_shift_en,
  output logic                  msel_enable,
  output logic                  sample_phase,
  input  logic [OSC_ROWS-1:0]   sel_osc_out,
  input  logic [OSC_ROWS-1:0]   sel_phase_out
);

  localparam int NUM_COLS    = OSC_PER_ROW + 1;
  localparam int ROW_BITS    = OSC_PER_ROW * CFG_BITS_TILE + CFG_BITS_EAST;
  localparam int NROW_BITS   = OSC_PER_ROW * CFG_BITS_NORTH + CFG_BITS_NE;
  localparam int NUM_OSC_P   = OSC_ROWS * OSC_PER_ROW;
  localparam int PHASE_BYTES = (NUM_OSC_P + 7) / 8;
  localparam int RESP_BYTES  = PHASE_BYTES > 3 ? PHASE_BYTES : 3;
  localparam int RESP_W      = 8 * RESP_BYTES;
  localparam int MAX_BITS    = (ROW_BITS > NROW_BITS ? ROW_BITS : NROW_BITS) + NUM_COLS;
  localparam int W_BITS      = $clog2(MAX_BITS + 1);
  localparam int W_RESP_CNT  = $clog2(RESP_BYTES + 1);
  localparam int W_COL       = $clog2(OSC_PER_ROW + 1);

  typedef enum logic [3:0] {
    ST_INIT,        // collecting the two init bytes
    ST_IDLE,        // waiting for a command byte
    ST_CMD_BYTES,   // collecting the rest of a 3-byte command
    ST_MSEL,        // shifting the mux-select chain
    ST_FREQ_START,
    ST_FREQ_WAIT,
    ST_PH_SAMPLE,   // waiting for the tiles to sample their phase
    ST_PH_CAPTURE,
    ST_PRG_WAIT,    // waiting for the next configuration byte
    ST_PRG_SHIFT,
    ST_RD_SHIFT,
    ST_RD_SEND,
    ST_SEND         // sending resp_q
  } state_e;

  state_e                 state, msel_ret;
  logic [W_CPB-1:0]       cpb, cpb_new;
  logic                   apply_cpb;
  logic [W_CMD-1:0]       cmd;
  logic [1:0]             cmd_bytes;
  logic [RESP_W-1:0]      resp_q;
  logic [W_RESP_CNT-1:0]  resp_left;
  logic [W_BITS-1:0]      bits_left;   // configuration bits still to move
  logic [W_BITS-1:0]      skip_left;   // read-back stage bits still to drop
  logic [3:0]             byte_bits;   // bits left in / collected into the current byte
  logic [7:0]             byte_q;
  logic [W_COL-1:0]       col, msel_cnt;
  logic [W_CFG_ROW_IDX-1:0] row;
  logic [2:0]             wait_cnt;

  // ---- UART ----
  logic       rx_valid, rx_err;
  logic [7:0] rx_data;
  logic       tx_start, tx_ready;
  logic [7:0] tx_data;

  uart_rx u_rx (
    .clk, .rst_n, .cycles_per_bit(cpb), .rx(uart_rx_i),
    .valid(rx_valid), .data(rx_data), .frame_err(rx_err)
  );
  uart_tx u_tx (
    .clk, .rst_n, .cycles_per_bit(cpb), .start(tx_start), .data(tx_data),
    .ready(tx_ready), .tx(uart_tx_o)
  );

  // ---- frequency counter ----
  logic                      fc_start, fc_busy, fc_done, fc_osc;
  logic [W_FREQ_COUNTER-1:0] fc_count;

  assign fc_osc = (int'(cmd[FLD_OSC_ROW_LSB +: W_OSC_ROW_ID]) < OSC_ROWS)
                ? sel_osc_out[cmd[FLD_OSC_ROW_LSB +: W_OSC_ROW_ID]] : 1'b0;

  fpim_freq_counter #(.W_COUNT(W_FREQ_COUNTER), .W_CAL(W_FREQ_CAL)) u_freq (
    .clk, .rst_n, .start(fc_start), .cal(cmd[FLD_FRQ_CAL_LSB +: W_FREQ_CAL]),
    .osc(fc_osc), .busy(fc_busy), .done(fc_done), .count(fc_count)
  );

  // ---- outputs decoded from the state ----
  logic [NUM_ROWS-1:0] row_onehot;
  assign row_onehot = (int'(row) < NUM_ROWS) ? NUM_ROWS'(1) << row : '0;

  logic rd_active;
  assign rd_active = (state == ST_RD_SHIFT) && (byte_bits != 4'd8) && (bits_left != 0);

  always_comb begin
    row_shift_en  = '0;
    row_read_sel  = '0;
    cfg_write_in  = 1'b0;
    msel_in       = 1'b0;
    msel_shift_en = 1'b0;
    sample_phase  = 1'b0;
    fc_start      = 1'b0;
    tx_start      = 1'b0;
    tx_data       = resp_q[7:0];
    unique case (state)
      ST_PRG_SHIFT: begin
        row_shift_en = row_onehot;
        cfg_write_in = byte_q[0];
      end
      ST_RD_SHIFT: if (rd_active) begin
        row_shift_en = row_onehot;
        row_read_sel = row_onehot;
        cfg_write_in = |(cfg_read_out & row_onehot);
      end
      ST_RD_SEND: begin
        tx_data  = byte_q;
        tx_start = tx_ready;
      end
      ST_MSEL: begin
        msel_shift_en = 1'b1;
        // bit for tile (OSC_PER_ROW-1-msel_cnt): 1 passes from the east
        msel_in = (W_COL'(OSC_PER_ROW - 1) - msel_cnt) < col;
      end
      ST_FREQ_START: fc_start = (wait_cnt == 3'd3);
      ST_PH_SAMPLE:  sample_phase = (wait_cnt == 3'd0);
      ST_SEND:       tx_start = tx_ready && (resp_left != 0);
      default: ;
    endcase
  end

  // ---- main sequencer ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_INIT;
      msel_ret    <= ST_IDLE;
      cpb         <= W_CPB'(CPB_RESET);
      cpb_new     <= '0;
      apply_cpb   <= 1'b0;
      cmd         <= '0;
      cmd_bytes   <= '0;
      resp_q      <= '0;
      resp_left   <= '0;
      bits_left   <= '0;
      skip_left   <= '0;
      byte_bits   <= '0;
      byte_q      <= '0;
      col         <= '0;
      msel_cnt    <= '0;
      row         <= '0;
      wait_cnt    <= '0;
      cfg_enable  <= 1'b0;
      msel_enable <= 1'b0;
      array_rst   <= 1'b0;
    end else begin
      array_rst <= 1'b0;
      unique case (state)
        // ------------------------------------------------------------
        ST_INIT: if (rx_valid) begin
          if (cmd_bytes == 2'd0) begin
            cpb_new[7:0] <= rx_data;
            cmd_bytes    <= 2'd1;
          end else begin
            cpb_new[W_CPB-1:8] <= rx_data[W_CPB-9:0];
            cmd_bytes          <= 2'd0;
            resp_q             <= RESP_W'({rx_data[W_CPB-9:0], cpb_new[7:0]});
            resp_left          <= W_RESP_CNT'(2);
            apply_cpb          <= 1'b1;
            state              <= ST_SEND;
          end
        end
        // ------------------------------------------------------------
        ST_IDLE: if (rx_valid) begin
          cmd <= W_CMD'(rx_data);
          row <= rx_data[FLD_CFG_ROW_LSB +: W_CFG_ROW_IDX];
          unique case (cmd_e'(rx_data[W_CMD_TYPE-1:0]))
            CMD_READ_FREQ: begin
              cmd_bytes <= 2'd1;
              state     <= ST_CMD_BYTES;
            end
            CMD_READ_PHASE: begin
              wait_cnt <= '0;
              state    <= ST_PH_SAMPLE;
            end
            CMD_PRGM_CONFIG: begin
              bits_left <= (rx_data[FLD_CFG_ROW_LSB +: W_CFG_ROW_IDX] == W_CFG_ROW_IDX'(OSC_ROWS))
                           ? W_BITS'(NROW_BITS) : W_BITS'(ROW_BITS);
              state     <= ST_PRG_WAIT;
            end
            CMD_READ_CONFIG: begin
              cfg_enable <= 1'b1;
              bits_left  <= (rx_data[FLD_CFG_ROW_LSB +: W_CFG_ROW_IDX] == W_CFG_ROW_IDX'(OSC_ROWS))
                            ? W_BITS'(NROW_BITS) : W_BITS'(ROW_BITS);
              skip_left  <= W_BITS'(NUM_COLS);
              byte_bits  <= '0;
              byte_q     <= '0;
              state      <= ST_RD_SHIFT;
            end
            CMD_ENABLE_CONFIG: begin
              cfg_enable <= rx_data[FLD_ENABLE_BIT];
              resp_q     <= '0;
              resp_left  <= W_RESP_CNT'(1);
              state      <= ST_SEND;
            end
            CMD_RESET: begin
              array_rst <= 1'b1;
              resp_q    <= '0;
              resp_left <= W_RESP_CNT'(1);
              state     <= ST_SEND;
            end
            default: ;   // NOP and unused codes
          endcase
        end
        // ------------------------------------------------------------
        ST_CMD_BYTES: if (rx_valid) begin
          cmd[8*cmd_bytes +: 8] <= rx_data;
          if (cmd_bytes == 2'd2) begin
            col      <= W_COL'(cmd[FLD_OSC_COL_LSB +: W_OSC_COL_ID]);
            msel_cnt <= '0;
            wait_cnt <= '0;
            msel_ret <= ST_FREQ_START;
            state    <= ST_MSEL;
          end
          cmd_bytes <= cmd_bytes + 1'b1;
        end
        // ------------------------------------------------------------
        ST_MSEL: begin
          msel_enable <= 1'b1;
          msel_cnt    <= msel_cnt + 1'b1;
          if (msel_cnt == W_COL'(OSC_PER_ROW - 1)) state <= msel_ret;
        end
        // let the counter's synchroniser fill with the newly selected
        // oscillator before the window opens
        ST_FREQ_START: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 3'd3) state <= ST_FREQ_WAIT;
        end
        ST_FREQ_WAIT: if (fc_done) begin
          msel_enable <= 1'b0;
          resp_q      <= RESP_W'(fc_count);
          resp_left   <= W_RESP_CNT'(3);
          state       <= ST_SEND;
        end
        // ------------------------------------------------------------
        ST_PH_SAMPLE: begin
          // sample_phase goes out in the first cycle; the tiles capture it
          // after their two register stages
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 3'd3) begin
            resp_q   <= '0;
            col      <= '0;
            msel_cnt <= '0;
            msel_ret <= ST_PH_CAPTURE;
            state    <= ST_MSEL;
          end
        end
        ST_PH_CAPTURE: begin
          for (int r = 0; r < OSC_ROWS; r++)
            resp_q[r * OSC_PER_ROW + int'(col)] <= sel_phase_out[r];
          if (col == W_COL'(OSC_PER_ROW - 1)) begin
            msel_enable <= 1'b0;
            resp_left   <= W_RESP_CNT'(PHASE_BYTES);
            state       <= ST_SEND;
          end else begin
            col      <= col + 1'b1;
            msel_cnt <= '0;
            state    <= ST_MSEL;
          end
        end
        // ------------------------------------------------------------
        ST_PRG_WAIT: begin
          if (bits_left == 0) begin
            resp_q    <= '0;
            resp_left <= W_RESP_CNT'(1);
            state     <= ST_SEND;
          end else if (rx_valid) begin
            byte_q    <= rx_data;
            byte_bits <= (bits_left < 8) ? 4'(bits_left) : 4'd8;
            state     <= ST_PRG_SHIFT;
          end
        end
        ST_PRG_SHIFT: begin
          byte_q    <= byte_q >> 1;
          byte_bits <= byte_bits - 1'b1;
          bits_left <= bits_left - 1'b1;
          if (byte_bits == 4'd1) state <= ST_PRG_WAIT;
        end
        // ------------------------------------------------------------
        ST_RD_SHIFT: begin
          if (rd_active) begin
            if (skip_left != 0) begin
              skip_left <= skip_left - 1'b1;
            end else begin
              byte_q[byte_bits[2:0]] <= |(cfg_read_out & row_onehot);
              byte_bits <= byte_bits + 1'b1;
              bits_left <= bits_left - 1'b1;
            end
          end else begin
            // a full byte, or the last bits of the row
            state <= ST_RD_SEND;
          end
        end
        ST_RD_SEND: if (tx_ready) begin
          byte_q    <= '0;
          byte_bits <= '0;
          if (bits_left == 0) begin
            cfg_enable <= 1'b0;
            state      <= ST_IDLE;
          end else begin
            state <= ST_RD_SHIFT;
          end
        end
        // ------------------------------------------------------------
        ST_SEND: begin
          if (tx_start) begin
            resp_q    <= resp_q >> 8;
            resp_left <= resp_left - 1'b1;
          end else if (resp_left == 0 && tx_ready) begin
            if (apply_cpb) cpb <= cpb_new;
            apply_cpb <= 1'b0;
            state     <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // ---- protocol rules ----
  // at most one row moves at a time, and only while it is being streamed
  assert property (@(posedge clk) disable iff (!rst_n)
                   (row_shift_en & (row_shift_en - 1'b1)) == '0)
    else $error("more than one configuration row shifting");
  // a byte is only handed to the transmitter when it can take it
  assert property (@(posedge clk) disable iff (!rst_n) tx_start |-> tx_ready)
    else $error("UART byte offered while transmitter busy");

endmodule
