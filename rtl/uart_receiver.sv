// uart_receiver: serial-to-parallel side of the UART, with its busy flag
// (rx_busy) and hold register (rx_hold_reg, driven out as rx_data).
//
// ser_in is first passed through a two-flip-flop synchroniser. In idle, the
// receiver looks at the line on every baud_clk_16 tick (16 per bit); a tick
// that sees it low after a tick that saw it high starts a frame, so a line
// held low (a broken stop bit, a break) must return high before the next
// frame can begin. Seven ticks later, near the middle of
// the start bit, the line is checked again: if it is high the low level was a
// glitch and the receiver returns to idle. Otherwise every 16th tick from
// there falls in the middle of the next bit, where the data bits (least
// significant first), the parity bit when parity_en is set, and the stop bit
// are sampled. A high stop bit copies the byte into rx_hold_reg, pulses
// new_rx_data for one clock and updates parity_error (received parity differs
// from the one computed with parity_odd). A low stop bit leaves rx_data alone
// and sets frame_error. Both error flags hold until the next frame ends.
//
// Low-power structure: the tick counter and the bit index are Gray counters,
// and each sampled bit is written straight into its place of the data buffer
// instead of being shifted through it. The frame format follows the usual
// UART packet; the sampling points, the false-start check, the synchroniser,
// the error flags and the insides are this design's own.
//
// Timing: new_rx_data is high in the clock after the tick that samples the
// middle of the stop bit; the line is seen two clocks late through the
// synchroniser. parity_en and parity_odd are taken at the start of
// each frame. Reset is synchronous and active high.
module uart_receiver #(
  parameter int unsigned DATA_BITS = 8
) (
  input  logic                 clock,
  input  logic                 reset,
  input  logic                 baud_clk_16,
  input  logic                 ser_in,
  input  logic                 parity_en,
  input  logic                 parity_odd,
  output logic [DATA_BITS-1:0] rx_data,
  output logic                 new_rx_data,
  output logic                 rx_busy,
  output logic                 parity_error,
  output logic                 frame_error
);
  import uart_pkg::*;

  localparam int unsigned IDX_W = $clog2(DATA_BITS);

  frame_state_e         state;
  logic                 sync1, rxd;
  logic [DATA_BITS-1:0] data_buf;
  logic [DATA_BITS-1:0] rx_hold_reg;
  logic                 par_en_q, par_odd_q, par_rx;
  logic                 line_high;   // line level at the previous tick in idle
  logic                 tick_en, tick_clr, sample, start_check;
  logic [TICK_W-1:0]    tick_gray, tick_bin;
  logic                 tick_last;
  logic                 idx_en;
  logic [IDX_W-1:0]     idx_gray, idx_bin;
  logic                 idx_last;

  // Two-flip-flop synchroniser; the line idles high.
  always_ff @(posedge clock) begin
    if (reset) begin
      sync1 <= 1'b1;
      rxd   <= 1'b1;
    end else begin
      sync1 <= ser_in;
      rxd   <= sync1;
    end
  end

  assign rx_busy     = (state != FR_IDLE);
  assign start_check = baud_clk_16 && (state == FR_START) && (tick_bin == TICK_W'(START_CHECK));
  assign sample      = baud_clk_16 && tick_last &&
                       (state inside {FR_DATA, FR_PARITY, FR_STOP});

  // Ticks since the frame began (start state) or since the last sample point.
  assign tick_en  = baud_clk_16 && rx_busy;
  assign tick_clr = (state == FR_IDLE) || (start_check && !rxd);
  gray_counter #(.WIDTH(TICK_W), .MODULUS(OVERSAMPLE)) u_tick (
    .clk(clock), .rst(reset), .en(tick_en), .clr(tick_clr),
    .gray_q(tick_gray), .bin_q(tick_bin), .last(tick_last)
  );

  // Index of the data bit being received.
  assign idx_en = sample && (state == FR_DATA);
  gray_counter #(.WIDTH(IDX_W), .MODULUS(DATA_BITS)) u_idx (
    .clk(clock), .rst(reset), .en(idx_en), .clr(state == FR_IDLE),
    .gray_q(idx_gray), .bin_q(idx_bin), .last(idx_last)
  );

  assign rx_data = rx_hold_reg;

  always_ff @(posedge clock) begin
    if (reset) begin
      state        <= FR_IDLE;
      data_buf     <= '0;
      rx_hold_reg  <= '0;
      par_en_q     <= 1'b0;
      par_odd_q    <= 1'b0;
      par_rx       <= 1'b0;
      line_high    <= 1'b0;
      new_rx_data  <= 1'b0;
      parity_error <= 1'b0;
      frame_error  <= 1'b0;
    end else begin
      new_rx_data <= 1'b0;
      unique case (state)
        FR_IDLE: if (baud_clk_16) begin
          line_high <= rxd;
          if (line_high && !rxd) begin
            par_en_q  <= parity_en;
            par_odd_q <= parity_odd;
            state     <= FR_START;
          end
        end
        FR_START: if (start_check) state <= rxd ? FR_IDLE : FR_DATA;
        FR_DATA: if (sample) begin
          data_buf[idx_bin] <= rxd;
          if (idx_last) state <= par_en_q ? FR_PARITY : FR_STOP;
        end
        FR_PARITY: if (sample) begin
          par_rx <= rxd;
          state  <= FR_STOP;
        end
        FR_STOP: if (sample) begin
          if (rxd) begin
            rx_hold_reg  <= data_buf;
            new_rx_data  <= 1'b1;
            parity_error <= par_en_q && (par_rx != parity_bit(32'(data_buf), DATA_BITS, par_odd_q));
            frame_error  <= 1'b0;
          end else begin
            frame_error  <= 1'b1;
          end
          line_high <= rxd;
          state     <= FR_IDLE;
        end
        default: state <= FR_IDLE;
      endcase
    end
  end

  // A received byte is announced only at the end of a frame with a good stop bit.
  a_pulse_end: assert property (@(posedge clock) disable iff (reset)
                                new_rx_data |-> !rx_busy && !frame_error);

  initial begin
    assert (DATA_BITS >= 2 && DATA_BITS <= 32)
      else $error("uart_receiver: DATA_BITS %0d out of range 2..32", DATA_BITS);
  end
endmodule
