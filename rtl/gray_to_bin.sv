// gray_to_bin: combinational Gray-code-to-binary converter.
//
// The top binary bit equals the top Gray bit; each lower binary bit is the
// XOR of the binary bit above it and its own Gray bit, a ripple XOR chain from
// the MSB down. This is the chain drawn as 'grey_binary' in the Gray counter
// of the baud generator. Purely combinational, no timing of its own.
module gray_to_bin #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] gray_in,
  output logic [WIDTH-1:0] bin_out
);
  always_comb begin
    bin_out[WIDTH-1] = gray_in[WIDTH-1];
    for (int i = int'(WIDTH) - 2; i >= 0; i--) bin_out[i] = bin_out[i+1] ^ gray_in[i];
  end
endmodule
