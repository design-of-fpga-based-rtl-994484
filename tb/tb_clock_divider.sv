// tb_clock_divider: self-checking test of the clock divider.
//
// Two instances run side by side. The first has the default 50 MHz input; its 1 MHz, 100 kHz,
// 10 kHz, 1 kHz and 100 Hz outputs are measured (period and high time in input clocks, from
// rising edge to rising edge), as is the 1 us strobe (one clock wide, every 50 clocks). The
// second runs from a 2 MHz input so that its 10 Hz and 1 Hz outputs complete whole periods in
// a short simulation (2 * 10^5 and 2 * 10^6 input clocks). Every complete period seen is
// checked; each output must show at least two (the 1 Hz output at least one).
module tb_clock_divider;

  logic clk = 1'b0;
  logic rst;
  logic [6:0] sq_a, sq_b;      // [0] = 1 MHz ... [6] = 1 Hz
  logic tick_a, tick_b;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;

  clock_divider u_a (
    .clk, .rst,
    .clock_1MHz (sq_a[0]), .clock_100KHz (sq_a[1]), .clock_10KHz (sq_a[2]), .clock_1KHz (sq_a[3]),
    .clock_100Hz (sq_a[4]), .clock_10Hz (sq_a[5]), .clock_1Hz (sq_a[6]), .tick_1MHz (tick_a)
  );

  clock_divider #(.CLK_HZ(2_000_000)) u_b (
    .clk, .rst,
    .clock_1MHz (sq_b[0]), .clock_100KHz (sq_b[1]), .clock_10KHz (sq_b[2]), .clock_1KHz (sq_b[3]),
    .clock_100Hz (sq_b[4]), .clock_10Hz (sq_b[5]), .clock_1Hz (sq_b[6]), .tick_1MHz (tick_b)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // Edge bookkeeping per output: [0..6] instance a, [7..13] instance b.
  longint last_rise [14];
  longint last_fall [14];
  int     periods   [14];
  longint exp_period[14];
  bit     prev      [14];
  longint last_tick;
  int     ticks = 0;

  initial begin : watchdog
    repeat (4_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      for (int i = 0; i < 14; i++) begin
        bit v;
        v = (i < 7) ? sq_a[i] : sq_b[i-7];
        if (v && !prev[i]) begin
          if (last_rise[i] >= 0 && last_fall[i] > last_rise[i]) begin
            periods[i]++;
            check(cyc - last_rise[i] == exp_period[i],
                  $sformatf("output %0d period %0d, expected %0d", i, cyc - last_rise[i], exp_period[i]));
            check(last_fall[i] - last_rise[i] == exp_period[i] / 2,
                  $sformatf("output %0d high for %0d, expected %0d", i, last_fall[i] - last_rise[i], exp_period[i] / 2));
          end
          last_rise[i] = cyc;
        end
        if (!v && prev[i]) last_fall[i] = cyc;
        prev[i] = v;
      end
      if (tick_a) begin
        if (ticks > 0) check(cyc - last_tick == 50, $sformatf("tick spacing %0d", cyc - last_tick));
        ticks++;
        last_tick = cyc;
      end
    end
  end

  initial begin
    longint p;
    p = 50;
    for (int i = 0; i < 7; i++) begin
      exp_period[i] = p;
      p = p * 10;
    end
    p = 2;
    for (int i = 7; i < 14; i++) begin
      exp_period[i] = p;
      p = p * 10;
    end
    for (int i = 0; i < 14; i++) begin
      last_rise[i] = -1;
      last_fall[i] = -1;
      periods[i] = 0;
      prev[i] = 1'b1;
    end

    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    wait (cyc >= 4_100_000);
    @(negedge clk);
    // instance a: 1 MHz .. 100 Hz; instance b: 10 Hz and 1 Hz
    for (int i = 0; i < 5; i++) check(periods[i] >= 2, $sformatf("output %0d saw %0d periods", i, periods[i]));
    check(periods[12] >= 2, $sformatf("10 Hz output saw %0d periods", periods[12]));
    check(periods[13] >= 1, $sformatf("1 Hz output saw %0d periods", periods[13]));
    check(ticks > 80_000, $sformatf("%0d strobes", ticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && tick_a) begin
      @(posedge clk);
      check(!tick_a, "strobe wider than one clock");
    end
  end

endmodule
