// tb_switching_activity: measures the switching activity that the Gray
// counters save, on the whole UART at its default parameters.
//
// The design's claim is that counting in Gray code instead of binary lowers
// dynamic power, because dynamic power grows with the number of 0-1 and 1-0
// transitions per clock. Power itself cannot be simulated here, so this
// testbench counts register-bit transitions instead. For every counter in the
// UART (the baud divider, baud_clk's counter, and the tick and bit counters of
// the transmitter and the receiver) it adds up, clock by clock, the bits that
// changed in the Gray register and the bits that would have changed in a
// binary register holding the same count (the counter's own binary value).
// The UART loops ser_out back to ser_in and sends three bytes.
//
// Checks: the divider toggles exactly one bit per clock, and over whole
// 256-count cycles a binary divider would toggle 510 bits per 256 counts;
// every counter toggles no more bits than its binary twin; all bytes come
// back. The totals and the saving in percent are printed.
module tb_switching_activity;
  localparam int BIT = 16 * 256;

  logic clock = 1'b0;
  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  logic       reset, new_tx_data, parity_en, parity_odd;
  logic [7:0] tx_data, rx_data;
  logic       tx_busy, ser_out, new_rx_data, rx_busy, parity_error, frame_error, baud_clk;
  logic [7:0] counter_out;

  uart dut (
    .clock, .reset, .tx_data, .new_tx_data, .parity_en, .parity_odd,
    .tx_busy, .ser_out, .ser_in(ser_out), .rx_data, .new_rx_data, .rx_busy,
    .parity_error, .frame_error, .baud_clk, .counter_out
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Per-counter toggle counts: 0 divider, 1 baud_clk counter, 2 tx tick,
  // 3 tx bit index, 4 rx tick, 5 rx bit index.
  localparam int NC = 6;
  longint gray_t[NC], bin_t[NC];
  logic [7:0] g_now[NC], b_now[NC], g_prev[NC], b_prev[NC];
  logic counting = 1'b0;
  longint clocks = 0;

  always_comb begin
    g_now[0] = dut.u_baud.u_div.gray_q;      b_now[0] = dut.u_baud.u_div.bin_q;
    g_now[1] = 8'(dut.u_baud.u_sub.gray_q);  b_now[1] = 8'(dut.u_baud.u_sub.bin_q);
    g_now[2] = 8'(dut.u_tx.u_tick.gray_q);   b_now[2] = 8'(dut.u_tx.u_tick.bin_q);
    g_now[3] = 8'(dut.u_tx.u_idx.gray_q);    b_now[3] = 8'(dut.u_tx.u_idx.bin_q);
    g_now[4] = 8'(dut.u_rx.u_tick.gray_q);   b_now[4] = 8'(dut.u_rx.u_tick.bin_q);
    g_now[5] = 8'(dut.u_rx.u_idx.gray_q);    b_now[5] = 8'(dut.u_rx.u_idx.bin_q);
  end

  always @(negedge clock) begin
    if (counting) begin
      clocks++;
      for (int i = 0; i < NC; i++) begin
        gray_t[i] += $countones(g_now[i] ^ g_prev[i]);
        bin_t[i]  += $countones(b_now[i] ^ b_prev[i]);
      end
    end
    g_prev = g_now;
    b_prev = b_now;
  end

  initial begin
    repeat (60 * BIT) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] bytes[3] = '{8'h55, 8'hC9, 8'h0F};
    longint g_all, b_all;
    for (int i = 0; i < NC; i++) begin
      gray_t[i] = 0;
      bin_t[i] = 0;
    end
    reset = 1'b1; new_tx_data = 1'b0; tx_data = '0; parity_en = 1'b1; parity_odd = 1'b0;
    repeat (3) @(posedge clock);
    @(negedge clock);
    reset = 1'b0;
    counting <= 1'b1;  // from the first clock edge after reset
    for (int n = 0; n < 3; n++) begin
      while (tx_busy) @(negedge clock);
      tx_data = bytes[n]; new_tx_data = 1'b1;
      @(negedge clock);
      new_tx_data = 1'b0;
      while (!new_rx_data) @(negedge clock);
      check(rx_data == bytes[n] && !parity_error && !frame_error, "byte returned");
    end
    // Stop on a whole number of divider cycles.
    while (clocks % 256 != 0) begin
      @(negedge clock);
      #1;
    end
    counting = 1'b0;

    check(gray_t[0] == clocks, "divider toggles one bit per clock");
    check(bin_t[0] == clocks / 256 * 510, "binary divider: 510 toggles per 256 counts");
    for (int i = 0; i < NC; i++) check(gray_t[i] <= bin_t[i], $sformatf("counter %0d no worse than binary", i));
    g_all = 0; b_all = 0;
    for (int i = 0; i < NC; i++) begin
      g_all += gray_t[i];
      b_all += bin_t[i];
      $display("counter %0d: gray=%0d binary=%0d", i, gray_t[i], bin_t[i]);
    end
    check(g_all * 100 <= b_all * 55, "total saving above 45%");
    $display("clocks=%0d counter toggles: gray=%0d binary=%0d saving=%0d.%0d%%", clocks, g_all, b_all,
             (b_all - g_all) * 100 / b_all, ((b_all - g_all) * 1000 / b_all) % 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
