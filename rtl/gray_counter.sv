// gray_counter: counter whose state register holds a Gray code.
//
// The low-power idea of the design: a binary counter flips two or more bits
// on half of its increments, while a Gray code changes exactly one bit per
// step, so the register and everything it drives switch less. The next state
// is formed as in the Gray counter of the proposed baud generator: the
// register's Gray code goes through a Gray-to-binary XOR chain, 1 is added,
// and the sum goes back through a binary-to-Gray XOR chain into the register.
//
// Interface: 'en' advances the count by one, 'clr' forces code 0 (clr wins
// over en), 'rst' is a synchronous active-high reset to 0, as the register is
// drawn with a synchronous reset. gray_q is the register, bin_q its binary
// value (taken from the Gray-to-binary chain that already exists), and 'last'
// is high while the count is MODULUS-1.
//
// MODULUS = 2**WIDTH (the default, as the 8-bit counter of the baud generator
// has no terminal-count logic) wraps for free and keeps the one-bit-per-step
// property at the wrap. A smaller MODULUS is this design's addition: it forces
// 0 after MODULUS-1, and that one step may change more than one bit.
// Timing: the count changes on the clock edge after en; all outputs are
// functions of the register only.
module gray_counter #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned MODULUS = 2 ** WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             clr,
  output logic [WIDTH-1:0] gray_q,
  output logic [WIDTH-1:0] bin_q,
  output logic             last
);
  logic [WIDTH-1:0] bin_inc;
  logic [WIDTH-1:0] gray_next;

  gray_to_bin #(.WIDTH(WIDTH)) u_g2b (.gray_in(gray_q), .bin_out(bin_q));

  assign last = (bin_q == WIDTH'(MODULUS - 1));

  always_comb begin
    if (MODULUS < 2 ** WIDTH && last) bin_inc = '0;
    else                              bin_inc = bin_q + 1'b1;
  end

  bin_to_gray #(.WIDTH(WIDTH)) u_b2g (.bin_in(bin_inc), .gray_out(gray_next));

  always_ff @(posedge clk) begin
    if (rst || clr) gray_q <= '0;
    else if (en)    gray_q <= gray_next;
  end

  initial begin
    assert (MODULUS >= 2 && MODULUS <= 2 ** WIDTH)
      else $error("gray_counter: MODULUS %0d does not fit WIDTH %0d", MODULUS, WIDTH);
  end
endmodule
