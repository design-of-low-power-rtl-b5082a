// uart_pkg: types and constants shared by the UART transmitter and receiver.
//
// A frame on the serial line is: one start bit (0), DATA_BITS data bits sent
// least significant bit first, an optional parity bit, and one stop bit (1).
// Each bit lasts OVERSAMPLE ticks of the baud_clk_16 tick from the baud
// generator. The frame layout follows the usual UART packet; the single stop
// bit, the 8-bit default data width and the state encoding are this design's
// own choices.
package uart_pkg;

  // Ticks of baud_clk_16 per bit on the line (16x oversampling).
  localparam int unsigned OVERSAMPLE = 16;
  // Width of the tick-in-bit counter.
  localparam int unsigned TICK_W = $clog2(OVERSAMPLE);
  // Receiver: value of the tick counter at the tick that checks the start bit.
  // The counter starts at 0 on the tick that first sees the line low, so the
  // check comes 7 ticks later, near the middle of the start bit.
  localparam int unsigned START_CHECK = OVERSAMPLE / 2 - 2;

  // Part of the frame the transmitter or receiver is in.
  typedef enum logic [2:0] {
    FR_IDLE   = 3'd0,  // line idle (transmitter: nothing held)
    FR_WAIT   = 3'd1,  // transmitter only: byte held, waiting for the next tick
    FR_START  = 3'd2,
    FR_DATA   = 3'd3,
    FR_PARITY = 3'd4,
    FR_STOP   = 3'd5
  } frame_state_e;

  // Parity bit for a data word: even parity makes the number of ones in data
  // plus parity even, odd parity makes it odd.
  function automatic logic parity_bit(input logic [31:0] data, input int unsigned bits,
                                      input logic odd);
    logic p;
    p = odd;
    for (int unsigned i = 0; i < bits; i++) p ^= data[i];
    return p;
  endfunction

endpackage
