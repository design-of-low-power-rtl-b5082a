// tb_gray_counter: self-checking testbench for gray_counter.
//
// Two instances: the default 8-bit, modulus-256 counter and a 4-bit counter
// with modulus 10. For every step the testbench keeps its own count i and
// checks gray_q against i ^ (i >> 1), bin_q against i, 'last' against
// i == MODULUS-1, and, for the full-modulus counter, that exactly one register
// bit changed (including at the wrap 255 -> 0). It also checks that a low
// 'en' holds the count, that 'clr' and 'rst' return it to 0, and compares the
// register toggles of a whole cycle with those a binary counter would make.
module tb_gray_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst, en, clr;
  logic [7:0] g8, b8;
  logic       l8;
  logic [3:0] g4, b4;
  logic       l4;

  gray_counter dut8 (.clk, .rst, .en, .clr, .gray_q(g8), .bin_q(b8), .last(l8));
  gray_counter #(.WIDTH(4), .MODULUS(10)) dut4 (
    .clk, .rst, .en, .clr, .gray_q(g4), .bin_q(b4), .last(l4)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned i8, i4, gray_toggles, bin_toggles;
    logic [7:0] prev_g;
    rst = 1'b1; en = 1'b0; clr = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(g8 == 8'h00 && g4 == 4'h0, "reset value");

    i8 = 0; i4 = 0; gray_toggles = 0; bin_toggles = 0;
    en = 1'b1;
    for (int step = 0; step < 300; step++) begin
      prev_g = g8;
      @(posedge clk); #1;
      if (step < 256) begin
        gray_toggles += $countones(prev_g ^ g8);
        bin_toggles  += $countones(8'(i8) ^ 8'((i8 + 1) % 256));
      end
      i8 = (i8 + 1) % 256;
      i4 = (i4 + 1) % 10;
      check(g8 == 8'(i8 ^ (i8 >> 1)), "8-bit Gray code");
      check(b8 == 8'(i8), "8-bit binary value");
      check(l8 == (i8 == 255), "8-bit last");
      check($countones(prev_g ^ g8) == 1, "one bit per step");
      check(b4 == 4'(i4), "mod-10 binary value");
      check(g4 == 4'(i4 ^ (i4 >> 1)), "mod-10 Gray code");
      check(l4 == (i4 == 9), "mod-10 last");
    end
    // One full cycle: Gray toggles 256 bits, binary would toggle 510.
    check(gray_toggles == 256, "Gray toggles per cycle");
    check(bin_toggles == 510, "binary toggles per cycle");
    $display("toggles per 256 counts: gray=%0d binary=%0d", gray_toggles, bin_toggles);

    // Hold with en low.
    en = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(b8 == 8'(i8) && b4 == 4'(i4), "hold when disabled");

    // clr wins over en.
    en = 1'b1; clr = 1'b1;
    @(posedge clk); #1;
    check(g8 == 0 && g4 == 0, "clear");
    clr = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(b8 == 5 && b4 == 5, "count after clear");
    rst = 1'b1;
    @(posedge clk); #1;
    check(g8 == 0 && g4 == 0, "synchronous reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
