// tb_uart_receiver: self-checking testbench for uart_receiver.
//
// The testbench makes its own baud_clk_16 tick, one clock in every D, and
// drives ser_in with frames of bit period P = 16 * D clocks (or a slightly
// different period, to check the tolerance of mid-bit sampling). It checks:
// each good frame gives exactly one new_rx_data pulse, near the middle of the
// stop bit, with the right rx_data; parity off, even and odd; a wrong parity
// bit sets parity_error; a low stop bit sets frame_error, gives no pulse and
// leaves rx_data alone; a low glitch shorter than half a bit starts nothing;
// rx_busy is high during a frame.
module tb_uart_receiver;
  localparam int D = 4;          // clocks per tick
  localparam int P = 16 * D;     // nominal clocks per bit

  logic clock = 1'b0;
  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  logic       reset, tick, ser_in, parity_en, parity_odd;
  logic [7:0] rx_data;
  logic       new_rx_data, rx_busy, parity_error, frame_error;
  int unsigned cyc = 0;
  int unsigned pulses = 0, pulse_cyc = 0;

  uart_receiver dut (
    .clock, .reset, .baud_clk_16(tick), .ser_in, .parity_en, .parity_odd,
    .rx_data, .new_rx_data, .rx_busy, .parity_error, .frame_error
  );

  always_ff @(posedge clock) cyc <= cyc + 1;
  assign tick = (cyc % D) == 1;

  always @(posedge clock) begin
    if (!reset && new_rx_data) begin
      pulses++;
      pulse_cyc = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one frame with bit period 'per'. bad_par flips the parity bit,
  // bad_stop sends a 0 stop bit.
  task automatic frame(input logic [7:0] data, input bit pen, input bit podd,
                       input int per, input bit bad_par, input bit bad_stop);
    logic [10:0] bits;
    int nbits, t0, p0;
    logic [7:0] old;
    bits = '1;
    bits[0] = 1'b0;
    bits[8:1] = data;
    if (pen) begin
      bits[9] = (^data) ^ podd ^ bad_par;
      nbits = 11;
    end else begin
      nbits = 10;
    end
    if (bad_stop) bits[nbits-1] = 1'b0;
    parity_en = pen; parity_odd = podd;
    old = rx_data;
    p0 = pulses;
    @(negedge clock);
    t0 = cyc;
    for (int k = 0; k < nbits; k++) begin
      ser_in = bits[k];
      repeat (per) begin
        @(negedge clock);
        if (k >= 1 && k < nbits - 1) check(rx_busy, "busy during frame");
      end
    end
    ser_in = 1'b1;
    repeat (2 * P) @(negedge clock);
    check(!rx_busy, "idle after frame");
    if (bad_stop) begin
      check(pulses == p0, "no pulse on framing error");
      check(frame_error, "frame_error set");
      check(rx_data == old, "rx_data kept on framing error");
    end else begin
      check(pulses == p0 + 1, "one pulse per frame");
      check(rx_data == data, $sformatf("rx_data %02h expected %02h", rx_data, data));
      check(!frame_error, "frame_error clear");
      check(parity_error == (pen && bad_par), "parity_error");
      if (per == P) begin
        // Pulse one clock after the sample near the middle of the stop bit.
        check(pulse_cyc >= t0 + (nbits - 1) * P + P / 2 - D &&
              pulse_cyc <= t0 + (nbits - 1) * P + P / 2 + D + 4, "pulse at mid stop bit");
      end
    end
  endtask

  initial begin
    int p0;
    reset = 1'b1; ser_in = 1'b1; parity_en = 1'b0; parity_odd = 1'b0;
    repeat (3) @(posedge clock);
    #1 reset = 1'b0;
    repeat (P) @(negedge clock);
    check(!rx_busy && !new_rx_data && rx_data == 0, "idle after reset");

    frame(8'hA5, 0, 0, P, 0, 0);
    frame(8'h3C, 1, 0, P, 0, 0);
    frame(8'h3C, 1, 1, P, 0, 0);
    frame(8'h81, 1, 0, P, 1, 0);   // parity error, even
    frame(8'h81, 1, 1, P, 1, 0);   // parity error, odd
    frame(8'h66, 0, 0, P, 0, 1);   // framing error
    frame(8'h00, 0, 0, P, 0, 0);
    frame(8'hFF, 1, 1, P, 0, 0);
    frame(8'h5A, 0, 0, P - 2, 0, 0);  // sender about 3% fast
    frame(8'hC3, 1, 0, P + 2, 0, 0);  // sender about 3% slow

    // A low glitch of a quarter bit is not a start bit.
    p0 = pulses;
    @(negedge clock) ser_in = 1'b0;
    repeat (P / 4) @(negedge clock);
    ser_in = 1'b1;
    repeat (3 * P) @(negedge clock);
    check(!rx_busy && pulses == p0, "glitch rejected");

    for (int n = 0; n < 30; n++) begin
      frame(8'($urandom), 1'($urandom), 1'($urandom), P, ($urandom % 4) == 0, ($urandom % 8) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
