// tb_uart_transmitter: self-checking testbench for uart_transmitter.
//
// The testbench makes its own baud_clk_16 tick, one clock in every D, and
// sends bytes with parity off, even and odd. For each byte it waits for the
// falling edge of the start bit and then checks ser_out in every single clock
// of the frame against the expected bit sequence (start 0, data LSB first,
// parity, stop 1), which checks both the values and that each bit lasts
// exactly 16 ticks = 16 * D clocks. It also checks that the frame starts
// within one tick of the load, that tx_busy covers the frame and falls at its
// end, and that a new_tx_data pulse while busy is ignored.
module tb_uart_transmitter;
  localparam int D = 3;          // clocks per tick
  localparam int P = 16 * D;     // clocks per bit

  logic clock = 1'b0;
  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  logic       reset, tick, new_tx_data, parity_en, parity_odd;
  logic [7:0] tx_data;
  logic       tx_busy, ser_out;
  int unsigned cyc = 0;

  uart_transmitter dut (
    .clock, .reset, .baud_clk_16(tick), .tx_data, .new_tx_data,
    .parity_en, .parity_odd, .tx_busy, .ser_out
  );

  always_ff @(posedge clock) cyc <= cyc + 1;
  assign tick = (cyc % D) == 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] data, input bit pen, input bit podd, input bit poke_busy);
    logic [10:0] bits;
    int nbits, t_load, t0;
    parity_en = pen; parity_odd = podd;
    // Expected line levels, bit 0 first on the line.
    bits = '1;
    bits[0] = 1'b0;
    bits[8:1] = data;
    if (pen) begin
      bits[9] = (^data) ^ podd;
      nbits = 11;
    end else begin
      nbits = 10;
    end
    check(!tx_busy, "idle before load");
    @(negedge clock);
    tx_data = data; new_tx_data = 1'b1;
    t_load = cyc;
    @(negedge clock);
    new_tx_data = 1'b0;
    tx_data = ~data;
    check(tx_busy, "busy after load");
    // Wait for the start bit.
    while (ser_out) @(negedge clock);
    t0 = cyc;
    check(t0 - t_load <= D + 2, "frame starts within a tick of the load");
    for (int k = 0; k < nbits; k++) begin
      for (int c = 0; c < P; c++) begin
        check(ser_out == bits[k], $sformatf("bit %0d level", k));
        if (k < nbits - 1 || c < P - 2) check(tx_busy, "busy during frame");
        if (poke_busy && k == 3 && c == 0) begin
          // A load request while busy must be ignored.
          tx_data = 8'h5A; new_tx_data = 1'b1;
        end else begin
          new_tx_data = 1'b0;
        end
        @(negedge clock);
      end
    end
    check(!tx_busy, "busy released after stop bit");
    check(ser_out, "line idle after frame");
  endtask

  initial begin
    reset = 1'b1; new_tx_data = 1'b0; tx_data = '0; parity_en = 1'b0; parity_odd = 1'b0;
    repeat (3) @(posedge clock);
    #1 reset = 1'b0;
    check(ser_out && !tx_busy, "idle after reset");
    send(8'hA5, 1'b0, 1'b0, 1'b0);
    send(8'h01, 1'b1, 1'b0, 1'b0);
    send(8'h01, 1'b1, 1'b1, 1'b0);
    send(8'h80, 1'b0, 1'b0, 1'b1);
    send(8'hFF, 1'b1, 1'b0, 1'b0);
    for (int n = 0; n < 20; n++) begin
      send(8'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
