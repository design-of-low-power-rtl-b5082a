// uart: low-power universal asynchronous receiver and transmitter.
//
// Three blocks share one clock: a baud generator that divides the clock down
// to a tick 16 times per bit (baud_clk_16) and a bit-rate square wave
// (baud_clk); a transmitter that takes a byte in parallel into its hold
// register and sends it as a start bit, data bits LSB first, optional parity
// and a stop bit on ser_out; and a receiver that finds frames on ser_in,
// samples them at mid-bit and delivers the byte in parallel on rx_data with a
// new_rx_data pulse. Both directions use the same tick, so they run at the
// same bit rate, and they work independently (full duplex; simplex or half
// duplex are a matter of use).
//
// The power-saving idea is that every counter in the UART - the clock
// divider, the tick-in-bit counters and the bit indices - is a Gray counter,
// so each count toggles one flip-flop instead of an average of two.
//
// Interface: present tx_data with new_tx_data for one clock while tx_busy is
// low. parity_en and parity_odd set the frame format for both directions and
// should change only while both sides are idle. Bit rate =
// f_clock / (16 * DIVISOR). Reset is synchronous and active high. The block
// structure and signal names follow the source design's block diagram; bringing
// tx_busy, rx_busy and the error flags out is this design's choice.
module uart #(
  parameter int unsigned DIV_WIDTH = 8,
  parameter int unsigned DIVISOR   = 2 ** DIV_WIDTH,
  parameter int unsigned DATA_BITS = 8
) (
  input  logic                 clock,
  input  logic                 reset,
  input  logic [DATA_BITS-1:0] tx_data,
  input  logic                 new_tx_data,
  input  logic                 parity_en,
  input  logic                 parity_odd,
  output logic                 tx_busy,
  output logic                 ser_out,
  input  logic                 ser_in,
  output logic [DATA_BITS-1:0] rx_data,
  output logic                 new_rx_data,
  output logic                 rx_busy,
  output logic                 parity_error,
  output logic                 frame_error,
  output logic                 baud_clk,
  output logic [DIV_WIDTH-1:0] counter_out
);
  logic baud_clk_16;

  baud_generator #(.DIV_WIDTH(DIV_WIDTH), .DIVISOR(DIVISOR)) u_baud (
    .clock, .reset, .counter_out, .baud_clk_16, .baud_clk
  );

  uart_transmitter #(.DATA_BITS(DATA_BITS)) u_tx (
    .clock, .reset, .baud_clk_16, .tx_data, .new_tx_data,
    .parity_en, .parity_odd, .tx_busy, .ser_out
  );

  uart_receiver #(.DATA_BITS(DATA_BITS)) u_rx (
    .clock, .reset, .baud_clk_16, .ser_in, .parity_en, .parity_odd,
    .rx_data, .new_rx_data, .rx_busy, .parity_error, .frame_error
  );
endmodule
