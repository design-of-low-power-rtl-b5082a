// uart_transmitter: parallel-to-serial side of the UART, with its hold
// register (tx_hold_reg) and busy flag (tx_busy).
//
// A byte offered on tx_data with new_tx_data while tx_busy is low is copied
// into tx_hold_reg, together with the parity settings, and tx_busy goes high.
// At the next baud_clk_16 tick the frame starts: start bit 0, the DATA_BITS
// data bits least significant first, a parity bit if parity_en was set (odd
// parity if parity_odd, else even), and stop bit 1. Each bit lasts exactly 16
// ticks. tx_busy falls when the stop bit ends, and the next byte can be taken
// in that same cycle. ser_out idles high.
//
// Low-power structure: the tick-in-bit counter and the data-bit index are Gray
// counters, and ser_out selects the current bit out of tx_hold_reg by index, so
// the held byte never shifts. The frame format follows the usual UART packet;
// the load handshake, the wait for a tick before the start bit, the single
// stop bit, the registered line output and the insides are this design's own.
//
// Timing: ser_out is registered, so every bit appears one clock after the tick
// that begins it; a frame lasts (10 + parity) * 16 tick periods. Reset is
// synchronous and active high.
module uart_transmitter #(
  parameter int unsigned DATA_BITS = 8
) (
  input  logic                 clock,
  input  logic                 reset,
  input  logic                 baud_clk_16,
  input  logic [DATA_BITS-1:0] tx_data,
  input  logic                 new_tx_data,
  input  logic                 parity_en,
  input  logic                 parity_odd,
  output logic                 tx_busy,
  output logic                 ser_out
);
  import uart_pkg::*;

  localparam int unsigned IDX_W = $clog2(DATA_BITS);

  frame_state_e         state;
  logic [DATA_BITS-1:0] tx_hold_reg;
  logic                 par_en_q, par_bit_q;
  logic                 load;
  logic                 tick_en, bit_en, bit_end;
  logic [TICK_W-1:0]    tick_gray, tick_bin;
  logic                 tick_last;
  logic [IDX_W-1:0]     idx_gray, idx_bin;
  logic                 idx_last;
  logic                 line_c;

  assign tx_busy = (state != FR_IDLE);
  assign load    = new_tx_data && !tx_busy;

  // Ticks within the current bit; wraps 15 -> 0 at each bit boundary.
  assign tick_en = baud_clk_16 && (state inside {FR_START, FR_DATA, FR_PARITY, FR_STOP});
  assign bit_end = tick_en && tick_last;
  gray_counter #(.WIDTH(TICK_W), .MODULUS(OVERSAMPLE)) u_tick (
    .clk(clock), .rst(reset), .en(tick_en), .clr(load),
    .gray_q(tick_gray), .bin_q(tick_bin), .last(tick_last)
  );

  // Index of the data bit being sent.
  assign bit_en = bit_end && (state == FR_DATA);
  gray_counter #(.WIDTH(IDX_W), .MODULUS(DATA_BITS)) u_idx (
    .clk(clock), .rst(reset), .en(bit_en), .clr(load),
    .gray_q(idx_gray), .bin_q(idx_bin), .last(idx_last)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      state       <= FR_IDLE;
      tx_hold_reg <= '0;
      par_en_q    <= 1'b0;
      par_bit_q   <= 1'b0;
    end else begin
      unique case (state)
        FR_IDLE: if (load) begin
          tx_hold_reg <= tx_data;
          par_en_q    <= parity_en;
          par_bit_q   <= parity_bit(32'(tx_data), DATA_BITS, parity_odd);
          state       <= FR_WAIT;
        end
        FR_WAIT:   if (baud_clk_16) state <= FR_START;
        FR_START:  if (bit_end) state <= FR_DATA;
        FR_DATA:   if (bit_end && idx_last) state <= par_en_q ? FR_PARITY : FR_STOP;
        FR_PARITY: if (bit_end) state <= FR_STOP;
        FR_STOP:   if (bit_end) state <= FR_IDLE;
        default:   state <= FR_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      FR_START:  line_c = 1'b0;
      FR_DATA:   line_c = tx_hold_reg[idx_bin];
      FR_PARITY: line_c = par_bit_q;
      default:   line_c = 1'b1;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) ser_out <= 1'b1;
    else       ser_out <= line_c;
  end

  // Handshake rules: an accepted load makes the transmitter busy, and the line
  // is low only while busy.
  a_load_busy: assert property (@(posedge clock) disable iff (reset) load |=> tx_busy);
  a_idle_high: assert property (@(posedge clock) disable iff (reset) !tx_busy && !$past(tx_busy) |-> ser_out);

  initial begin
    assert (DATA_BITS >= 2 && DATA_BITS <= 32)
      else $error("uart_transmitter: DATA_BITS %0d out of range 2..32", DATA_BITS);
  end
endmodule
