// baud_generator: frequency divider that makes the UART's bit-rate ticks.
//
// A DIV_WIDTH-bit Gray counter (gray_counter) runs on the system clock and
// divides it by DIVISOR. While the count is at its last state the one-clock
// pulse baud_clk_16 is high; it comes 16 times per bit period and paces both
// the transmitter and the receiver (16x oversampling). A second, 4-bit Gray
// counter advances on every baud_clk_16 pulse; its top bit is baud_clk, a
// square wave at the bit rate with 50% duty (the top bit of a Gray code
// equals the top bit of the binary count).
//
// Using Gray counters instead of binary ones is the low-power method of the
// design: each divider step toggles exactly one register bit. The 8-bit,
// free-running divider (DIVISOR = 256) follows the proposed Gray baud
// generator, which has no terminal-count logic; the decoding of the tick from
// the count and the baud_clk output stage are this design's own choices.
//
// Timing: baud_clk_16 is high for one clock every DIVISOR clocks, first in
// the cycle DIVISOR-1 clocks after reset is released. Bit rate =
// f_clock / (16 * DIVISOR); e.g. 9600 bit/s at DIVISOR = 256 needs 39.3216 MHz.
// Reset is synchronous and active high.
module baud_generator #(
  parameter int unsigned DIV_WIDTH = 8,
  parameter int unsigned DIVISOR   = 2 ** DIV_WIDTH
) (
  input  logic                 clock,
  input  logic                 reset,
  output logic [DIV_WIDTH-1:0] counter_out,
  output logic                 baud_clk_16,
  output logic                 baud_clk
);
  import uart_pkg::*;

  logic [DIV_WIDTH-1:0] div_bin;
  logic [TICK_W-1:0]    sub_gray, sub_bin;
  logic                 div_last, sub_last;

  gray_counter #(.WIDTH(DIV_WIDTH), .MODULUS(DIVISOR)) u_div (
    .clk(clock), .rst(reset), .en(1'b1), .clr(1'b0),
    .gray_q(counter_out), .bin_q(div_bin), .last(div_last)
  );

  assign baud_clk_16 = div_last;

  gray_counter #(.WIDTH(TICK_W), .MODULUS(OVERSAMPLE)) u_sub (
    .clk(clock), .rst(reset), .en(baud_clk_16), .clr(1'b0),
    .gray_q(sub_gray), .bin_q(sub_bin), .last(sub_last)
  );

  assign baud_clk = sub_gray[TICK_W-1];
endmodule
