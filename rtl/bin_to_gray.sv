// bin_to_gray: combinational binary-to-Gray-code converter.
//
// g[i] = b[i] ^ b[i+1] for every bit below the top one, and the top bit is
// copied. This is the XOR chain drawn as 'bin_to_grey' in the Gray counter of
// the baud generator. Purely combinational, no timing of its own.
module bin_to_gray #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] bin_in,
  output logic [WIDTH-1:0] gray_out
);
  assign gray_out = bin_in ^ (bin_in >> 1);
endmodule
