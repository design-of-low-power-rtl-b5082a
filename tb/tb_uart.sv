// tb_uart: end-to-end testbench for the whole UART at its default parameters
// (divide by 256, 16 ticks per bit, 8 data bits: 4096 clocks per bit).
//
// Part of the run loops ser_out back to ser_in, so every byte the transmitter
// sends must come back out of the receiver; the rest drives ser_in from the
// testbench's own serial sender and decodes ser_out with its own mid-bit
// sampler. Each mechanism of the design is made to happen and counted:
// frames with parity off, even and odd; a load request refused while busy; a
// parity error; a framing error; a rejected start glitch; full-duplex
// operation (a frame received while one is sent); baud_clk cycles. A mechanism
// that never happened counts as a failure. Rates are checked by cycle count:
// the receive pulse must come (frame bits - 0.5) bit periods after the start
// edge, and baud_clk must have a period of one bit.
module tb_uart;
  localparam int BIT = 16 * 256;   // clocks per bit at the default DIVISOR

  logic clock = 1'b0;
  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  logic       reset, new_tx_data, parity_en, parity_odd;
  logic [7:0] tx_data, rx_data;
  logic       tx_busy, ser_out, ser_in, new_rx_data, rx_busy, parity_error, frame_error;
  logic       baud_clk;
  logic [7:0] counter_out;
  logic       loopback, drv_line;
  int unsigned cyc = 0;
  int unsigned rx_pulses = 0, rx_pulse_cyc = 0;

  // Mechanism counters.
  int n_par_off = 0, n_par_even = 0, n_par_odd = 0, n_refused = 0;
  int n_parity_err = 0, n_frame_err = 0, n_glitch = 0, n_duplex = 0, n_baud_edges = 0;

  assign ser_in = loopback ? ser_out : drv_line;

  uart dut (
    .clock, .reset, .tx_data, .new_tx_data, .parity_en, .parity_odd,
    .tx_busy, .ser_out, .ser_in, .rx_data, .new_rx_data, .rx_busy,
    .parity_error, .frame_error, .baud_clk, .counter_out
  );

  always_ff @(posedge clock) cyc <= cyc + 1;

  always @(posedge clock) begin
    if (!reset && new_rx_data) begin
      rx_pulses++;
      rx_pulse_cyc = cyc;
    end
  end

  // baud_clk period check.
  int unsigned last_rise = 0;
  logic        prev_bclk = 1'b0;
  always @(posedge clock) begin
    if (!reset) begin
      if (baud_clk && !prev_bclk) begin
        if (n_baud_edges > 0) check(cyc - last_rise == BIT, "baud_clk period");
        n_baud_edges++;
        last_rise = cyc;
      end
      prev_bclk <= baud_clk;
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
    repeat (60 * 12 * BIT) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [10:0] frame_bits(input logic [7:0] d, input bit pen, input bit podd,
                                             output int nbits);
    logic [10:0] b;
    b = '1;
    b[0] = 1'b0;
    b[8:1] = d;
    if (pen) begin
      b[9] = (^d) ^ podd;
      nbits = 11;
    end else begin
      nbits = 10;
    end
    return b;
  endfunction

  task automatic count_mode(input bit pen, input bit podd);
    if (!pen)      n_par_off++;
    else if (podd) n_par_odd++;
    else           n_par_even++;
  endtask

  // Load a byte into the transmitter (waits until it is free).
  task automatic load(input logic [7:0] d);
    @(negedge clock);
    while (tx_busy) @(negedge clock);
    tx_data = d; new_tx_data = 1'b1;
    @(negedge clock);
    new_tx_data = 1'b0;
  endtask

  // Loopback: send d, expect it back. refuse: also try to load another byte
  // in the middle of the frame.
  task automatic loop_byte(input logic [7:0] d, input bit pen, input bit podd, input bit refuse);
    int nbits, t0, p0;
    void'(frame_bits(d, pen, podd, nbits));
    parity_en = pen; parity_odd = podd;
    p0 = rx_pulses;
    load(d);
    while (ser_out) @(negedge clock);
    t0 = cyc;
    if (refuse) begin
      repeat (3 * BIT) @(negedge clock);
      check(tx_busy, "busy mid-frame");
      tx_data = ~d; new_tx_data = 1'b1;
      @(negedge clock);
      new_tx_data = 1'b0;
      n_refused++;
    end
    while (rx_pulses == p0) @(negedge clock);
    check(rx_data == d, $sformatf("loopback %02h got %02h", d, rx_data));
    check(!parity_error && !frame_error, "no error on loopback");
    // Mid stop bit, through the 2-flop synchroniser, within one tick.
    check(rx_pulse_cyc >= t0 + (nbits - 1) * BIT + BIT / 2 - 256 &&
          rx_pulse_cyc <= t0 + (nbits - 1) * BIT + BIT / 2 + 256 + 4, "receive latency");
    while (tx_busy) @(negedge clock);
    check(cyc - t0 >= nbits * BIT - 2 && cyc - t0 <= nbits * BIT, "frame length");
    count_mode(pen, podd);
    repeat (BIT) @(negedge clock);
    check(rx_pulses == p0 + 1, "exactly one byte received");
  endtask

  // Drive one frame on ser_in from the testbench.
  task automatic drive(input logic [7:0] d, input bit pen, input bit podd,
                       input bit bad_par, input bit bad_stop);
    logic [10:0] b;
    int nbits;
    b = frame_bits(d, pen, podd, nbits);
    if (pen && bad_par) b[9] = ~b[9];
    if (bad_stop) b[nbits-1] = 1'b0;
    for (int k = 0; k < nbits; k++) begin
      drv_line = b[k];
      repeat (BIT) @(negedge clock);
    end
    drv_line = 1'b1;
  endtask

  // Decode one frame from ser_out with the testbench's own sampler.
  task automatic decode(input bit pen, input bit podd, output logic [7:0] d, output bit ok);
    int nbits;
    logic [10:0] got;
    nbits = pen ? 11 : 10;
    while (ser_out) @(negedge clock);
    repeat (BIT / 2) @(negedge clock);
    for (int k = 0; k < nbits; k++) begin
      got[k] = ser_out;
      if (k < nbits - 1) repeat (BIT) @(negedge clock);
    end
    d = got[8:1];
    ok = !got[0] && got[nbits-1] && (!pen || got[9] == ((^d) ^ podd));
  endtask

  initial begin
    logic [7:0] d, got;
    bit ok;
    int p0;
    reset = 1'b1; new_tx_data = 1'b0; tx_data = '0; parity_en = 1'b0; parity_odd = 1'b0;
    loopback = 1'b1; drv_line = 1'b1;
    repeat (3) @(posedge clock);
    #1 reset = 1'b0;

    // Loopback in all three parity modes, one refused load.
    loop_byte(8'hA5, 0, 0, 0);
    loop_byte(8'h3C, 1, 0, 0);
    loop_byte(8'h3D, 1, 1, 0);
    loop_byte(8'h81, 0, 0, 1);
    for (int n = 0; n < 6; n++) loop_byte(8'($urandom), 1'($urandom), 1'($urandom), 1'b0);

    // Testbench-driven line: parity error, framing error, glitch.
    loopback = 1'b0;
    parity_en = 1'b1; parity_odd = 1'b0;
    p0 = rx_pulses;
    drive(8'h96, 1, 0, 1, 0);
    repeat (BIT) @(negedge clock);
    check(rx_pulses == p0 + 1 && rx_data == 8'h96 && parity_error, "parity error flagged");
    if (parity_error) n_parity_err++;
    parity_en = 1'b0;
    p0 = rx_pulses;
    drive(8'h42, 0, 0, 0, 1);
    repeat (2 * BIT) @(negedge clock);
    check(rx_pulses == p0 && frame_error && rx_data == 8'h96, "framing error flagged");
    if (frame_error) n_frame_err++;
    p0 = rx_pulses;
    drv_line = 1'b0;
    repeat (BIT / 4) @(negedge clock);
    drv_line = 1'b1;
    repeat (3 * BIT) @(negedge clock);
    check(rx_pulses == p0 && !rx_busy, "glitch ignored");
    if (rx_pulses == p0 && !rx_busy) n_glitch++;

    // Full duplex: receive one byte while sending another.
    for (int n = 0; n < 3; n++) begin
      logic [7:0] dt, dr;
      dt = 8'($urandom); dr = 8'($urandom);
      parity_en = n[0]; parity_odd = n[1];
      p0 = rx_pulses;
      load(dt);
      fork
        decode(n[0], n[1], got, ok);
        begin
          repeat (BIT / 3) @(negedge clock);
          drive(dr, n[0], n[1], 0, 0);
        end
      join
      repeat (BIT) @(negedge clock);
      check(ok && got == dt, "duplex: transmitted byte");
      check(rx_pulses == p0 + 1 && rx_data == dr && !parity_error && !frame_error,
            "duplex: received byte");
      if (ok && got == dt && rx_data == dr) n_duplex++;
    end

    $display("mechanisms: parity_off=%0d even=%0d odd=%0d refused_load=%0d parity_err=%0d frame_err=%0d glitch=%0d duplex=%0d baud_clk_edges=%0d",
             n_par_off, n_par_even, n_par_odd, n_refused, n_parity_err, n_frame_err,
             n_glitch, n_duplex, n_baud_edges);
    check(n_par_off > 0, "parity-off frame happened");
    check(n_par_even > 0, "even-parity frame happened");
    check(n_par_odd > 0, "odd-parity frame happened");
    check(n_refused > 0, "refused load happened");
    check(n_parity_err > 0, "parity error happened");
    check(n_frame_err > 0, "framing error happened");
    check(n_glitch > 0, "glitch rejection happened");
    check(n_duplex > 0, "full duplex happened");
    check(n_baud_edges > 1, "baud_clk toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
