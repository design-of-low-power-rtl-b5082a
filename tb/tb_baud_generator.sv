// tb_baud_generator: self-checking testbench for baud_generator.
//
// Runs the default generator (8-bit Gray divider, divide by 256) and a second
// one with DIVISOR = 10. A cycle counter started at reset release predicts
// each output: counter_out must equal the Gray code of (cycle mod DIVISOR),
// baud_clk_16 must be high exactly in cycles where cycle mod DIVISOR is
// DIVISOR-1, and baud_clk must equal bit 3 of the number of ticks seen so far
// (a square wave of 16 tick periods). The rate checks come from the cycle
// count: ticks every DIVISOR clocks, baud_clk every 16 * DIVISOR clocks.
module tb_baud_generator;
  logic clock = 1'b0;
  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  logic reset;

  logic [7:0] cnt_a;
  logic       tick_a, bclk_a;
  logic [7:0] cnt_b;
  logic       tick_b, bclk_b;

  baud_generator dut_a (.clock, .reset, .counter_out(cnt_a), .baud_clk_16(tick_a), .baud_clk(bclk_a));
  baud_generator #(.DIVISOR(10)) dut_b (
    .clock, .reset, .counter_out(cnt_b), .baud_clk_16(tick_b), .baud_clk(bclk_b)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int RUN = 256 * 16 * 3 + 100;

  initial begin
    repeat (RUN + 1000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ma, mb, ticks_a, ticks_b, edges_a, last_edge_a;
    logic prev_b;
    reset = 1'b1;
    repeat (3) @(posedge clock);
    #1 reset = 1'b0;
    ticks_a = 0; ticks_b = 0; edges_a = 0; last_edge_a = 0;
    prev_b = 1'b0;
    for (int unsigned cyc = 0; cyc < RUN; cyc++) begin
      // Values in the clock cycle 'cyc' after reset release.
      ma = cyc % 256;
      mb = cyc % 10;
      check(cnt_a == 8'(ma ^ (ma >> 1)), "divider Gray count");
      check(tick_a == (ma == 255), "tick every 256 clocks");
      check(cnt_b == 8'(mb ^ (mb >> 1)), "divide-by-10 Gray count");
      check(tick_b == (mb == 9), "tick every 10 clocks");
      check(bclk_a == ((ticks_a >> 3) & 1), "baud_clk from tick count");
      check(bclk_b == ((ticks_b >> 3) & 1), "baud_clk divide-by-10");
      if (bclk_a && !prev_b) begin
        if (edges_a > 0) check(cyc - last_edge_a == 16 * 256, "baud_clk period 4096 clocks");
        edges_a++;
        last_edge_a = cyc;
      end
      prev_b = bclk_a;
      if (tick_a) ticks_a++;
      if (tick_b) ticks_b++;
      @(posedge clock); #1;
    end
    check(edges_a >= 2, "baud_clk rising edges seen");
    check(ticks_a == RUN / 256, "number of ticks");
    $display("ticks=%0d baud_clk rising edges=%0d", ticks_a, edges_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
