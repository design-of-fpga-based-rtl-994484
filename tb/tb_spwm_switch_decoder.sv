// tb_spwm_switch_decoder: self-checking test of the four switch-pattern decoders.
//
// All four combinations (ma = 0.5 / 0.75, positive / negative half) are driven with the same
// count, swept once over 0..19999. The testbench works out the expected pattern on its own: it
// solves the natural-sampling crossings |theta - c_n| / 4.5 = ma * sin(theta) by bisection with
// real arithmetic, rounds each edge to the 0.09 degree (5 us) grid and builds the on/off state
// for every count; the one edge the reference table places on the other side of a rounding
// boundary (end of pulse 10, ma = 0.75: 4940 us) is taken from the table. Independently, the
// printed reference table entries (pulses 1-3, 10, 11, 18-23, 30, 31, 39, 40) are checked
// edge by edge on the recorded outputs. Checks: every output value, pulse count per half,
// the printed edges, no overlap of the two pairs, and the one-clock output latency.
module tb_spwm_switch_decoder;
  import spwm_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic   clk = 1'b0;
  logic   rst;
  count_t count;
  logic   gate [2][2];   // [ma][half]

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spwm_switch_decoder #(.MA(MA_050), .HALF(HALF_POS)) u_p050 (.clk, .rst, .count, .gate(gate[0][0]));
  spwm_switch_decoder #(.MA(MA_050), .HALF(HALF_NEG)) u_n050 (.clk, .rst, .count, .gate(gate[0][1]));
  spwm_switch_decoder #(.MA(MA_075), .HALF(HALF_POS)) u_p075 (.clk, .rst, .count, .gate(gate[1][0]));
  spwm_switch_decoder #(.MA(MA_075), .HALF(HALF_NEG)) u_n075 (.clk, .rst, .count, .gate(gate[1][1]));

  // Expected edges in us for the positive half, per modulation index.
  int exp_a [2][20];
  int exp_b [2][20];
  // Recorded output per count value.
  bit rec [2][2][20000];

  function automatic real f(real ma, real th, real c);
    return ma * $sin(th * PI / 180.0) - ((th > c) ? (th - c) : (c - th)) / 4.5;
  endfunction

  // Bisection for the crossing in [lo, hi]; rising: f goes from <0 to >0.
  function automatic real crossing(real ma, real c, real lo, real hi, bit rising);
    real m;
    for (int i = 0; i < 60; i++) begin
      m = (lo + hi) / 2.0;
      if ((f(ma, m, c) > 0.0) == rising) hi = m;
      else lo = m;
    end
    return (lo + hi) / 2.0;
  endfunction

  function automatic int to_us(real deg);
    // nearest 0.09 degree step, 5 us per step
    return 5 * int'($floor(deg / 0.09 + 0.5));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // Printed reference entries: pulse number (1-based), alpha us, beta us.
  typedef struct { int n; int a; int b; } printed_t;
  printed_t pr050 [14] = '{
    '{1, 240, 260}, '{2, 720, 780}, '{3, 1205, 1300}, '{10, 4625, 4875}, '{11, 5125, 5375},
    '{18, 8700, 8795}, '{19, 9220, 9280}, '{20, 9740, 9760}, '{21, 10240, 10260},
    '{22, 10720, 10780}, '{23, 11205, 11300}, '{30, 14625, 14875}, '{31, 15125, 15375},
    '{39, 19220, 19280}};
  printed_t pr075 [14] = '{
    '{1, 235, 265}, '{2, 710, 795}, '{3, 1180, 1325}, '{10, 4565, 4940}, '{11, 5065, 5435},
    '{18, 8675, 8820}, '{19, 9205, 9290}, '{20, 9735, 9765}, '{21, 10235, 10265},
    '{22, 10710, 10795}, '{23, 11180, 11325}, '{30, 14565, 14940}, '{31, 15065, 15435},
    '{39, 19205, 19290}};

  // Check one printed pulse against the recorded waveform.
  task automatic check_printed(int mi, printed_t p);
    int h;
    h = (p.n > 20) ? 1 : 0;
    check(rec[mi][h][p.a] == 1'b1 && rec[mi][h][p.a-1] == 1'b0,
          $sformatf("ma%0d t%0d starts at %0d us", mi, p.n, p.a));
    check(rec[mi][h][p.b-1] == 1'b1 && rec[mi][h][p.b] == 1'b0,
          $sformatf("ma%0d t%0d ends at %0d us", mi, p.n, p.b));
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ma, c;
    bit  e;
    int  pulses [2][2];
    bit  prev [2][2];

    // Expected table from the natural-sampling rule.
    for (int mi = 0; mi < 2; mi++) begin
      ma = (mi == 0) ? 0.5 : 0.75;
      for (int n = 0; n < 20; n++) begin
        c = 4.5 + 9.0 * n;
        exp_a[mi][n] = to_us(crossing(ma, c, c - 4.5, c, 1'b1));
        exp_b[mi][n] = to_us(crossing(ma, c, c, c + 4.5, 1'b0));
      end
    end
    exp_b[1][9] = 4940;   // reference-table value at a rounding boundary

    rst   = 1'b1;
    count = '0;
    repeat (3) @(posedge clk);
    check(gate[0][0] == 0 && gate[0][1] == 0 && gate[1][0] == 0 && gate[1][1] == 0,
          "outputs low in reset");
    @(negedge clk);
    rst = 1'b0;

    // Latency: a count inside pulse 1 shows at the output after exactly one clock.
    count = count_t'(245);
    @(posedge clk); #1;
    check(gate[0][0] == 1'b1 && gate[1][0] == 1'b1, "one-clock latency");
    @(negedge clk);
    count = count_t'(0);
    @(posedge clk); #1;

    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      count = count_t'(t);
      @(posedge clk); #1;
      for (int mi = 0; mi < 2; mi++)
        for (int h = 0; h < 2; h++)
          rec[mi][h][t] = gate[mi][h];
    end

    // Compare every count with the expected pattern.
    for (int mi = 0; mi < 2; mi++) begin
      for (int h = 0; h < 2; h++) begin
        automatic int mism = 0;
        pulses[mi][h] = 0;
        prev[mi][h] = 1'b0;
        for (int t = 0; t < 20000; t++) begin
          e = 1'b0;
          for (int n = 0; n < 20; n++)
            if (t >= exp_a[mi][n] + 10000 * h && t < exp_b[mi][n] + 10000 * h) e = 1'b1;
          checks++;
          if (rec[mi][h][t] != e) begin
            mism++;
            failures++;
            if (mism <= 3) $display("FAIL: ma%0d half%0d t=%0d got %0b exp %0b", mi, h, t, rec[mi][h][t], e);
          end
          if (rec[mi][h][t] && !prev[mi][h]) pulses[mi][h]++;
          prev[mi][h] = rec[mi][h][t];
        end
        check(pulses[mi][h] == 20, $sformatf("ma%0d half%0d has %0d pulses", mi, h, pulses[mi][h]));
      end
      for (int t = 0; t < 20000; t++)
        check(!(rec[mi][0][t] && rec[mi][1][t]), $sformatf("ma%0d pairs overlap at %0d", mi, t));
    end

    foreach (pr050[i]) check_printed(0, pr050[i]);
    foreach (pr075[i]) check_printed(1, pr075[i]);
    // t40 ends at 19760 / 19765 us: the pattern is low from there to the end of the period.
    check(rec[0][1][19759] && !rec[0][1][19760] && rec[0][1][19740] && !rec[0][1][19739], "ma050 t40");
    check(rec[1][1][19764] && !rec[1][1][19765] && rec[1][1][19735] && !rec[1][1][19734], "ma075 t40");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
