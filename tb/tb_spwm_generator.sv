// tb_spwm_generator: end-to-end test of the SPWM generator at its default parameters.
//
// The generator runs from a 50 MHz clock for two full 20 ms reference periods plus a margin
// (about 2.05 million clocks). Every edge of the four switch-pair outputs is time-stamped in
// clocks. The checks, with expected values taken from the reference switching table and worked
// out here rather than read from the design:
//   - S1 = S2 and S3 = S4 at every clock; the pairs never conduct together;
//   - 20 pulses per pair per period, S1-S2 only in the first half, S3-S4 only in the second;
//   - each printed table pulse starts and ends at its tabulated time (1 us = 50 clocks),
//     measured from the start of the period, and the first pulse starts 240 us (ma = 0.5) /
//     235 us (ma = 0.75) after the time base starts;
//   - the period is exactly 20 ms (the time base wraps at 20000);
//   - the dead time at each half-cycle boundary is 480 us (ma = 0.5) and 470 us (ma = 0.75);
//   - output1MHz has a 50-clock period, output25MHz a 2-clock period.
// Each mechanism (pulses on every output, counter wrap, dead time at both boundaries, both
// clock outputs) is counted and must occur at least once.
module tb_spwm_generator;

  localparam longint CPU = 50;         // clocks per microsecond
  localparam longint PER = 20000 * CPU; // clocks per reference period

  logic clk = 1'b0;
  logic rst;
  logic out25, out1;
  logic s1_050, s2_050, s3_050, s4_050, s1_075, s2_075, s3_075, s4_075;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint rel_cyc;   // clock at which the time base left reset

  always #10 clk = ~clk;

  spwm_generator u_dut (
    .clockin50MHz (clk), .rst (rst), .output25MHz (out25), .output1MHz (out1),
    .s1_ma050 (s1_050), .s2_ma050 (s2_050), .s3_ma050 (s3_050), .s4_ma050 (s4_050),
    .s1_ma075 (s1_075), .s2_ma075 (s2_075), .s3_ma075 (s3_075), .s4_ma075 (s4_075)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 30) $display("FAIL: %s", what);
    end
  endtask

  // Edge logs: index 0 = S1S2 ma0.5, 1 = S3S4 ma0.5, 2 = S1S2 ma0.75, 3 = S3S4 ma0.75.
  longint rise [4][$];
  longint fall [4][$];
  bit     prev [4];
  int     overlap = 0, pair_mismatch = 0;
  longint r25 = -1, r1 = -1;
  int     n25 = 0, n1 = 0;

  initial begin : watchdog
    repeat (2_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    bit v [4];
    cyc <= cyc + 1;
    if (!rst) begin
      v[0] = s1_050; v[1] = s3_050; v[2] = s1_075; v[3] = s3_075;
      if (s1_050 != s2_050 || s3_050 != s4_050 || s1_075 != s2_075 || s3_075 != s4_075)
        pair_mismatch++;
      if ((s1_050 && s3_050) || (s1_075 && s3_075)) overlap++;
      for (int i = 0; i < 4; i++) begin
        if (v[i] && !prev[i]) rise[i].push_back(cyc - rel_cyc);
        if (!v[i] && prev[i]) fall[i].push_back(cyc - rel_cyc);
        prev[i] = v[i];
      end
    end
  end

  // Clock outputs: period of output25MHz in 50 MHz clocks (sampled on both edges of clk).
  always @(posedge out25) begin
    if (!rst) begin
      if (r25 >= 0) begin
        check(($realtime - r25) == 40, $sformatf("output25MHz period %0t", $realtime - r25));
        n25++;
      end
      r25 = longint'($realtime);
    end
  end
  always @(posedge out1) begin
    if (!rst) begin
      if (r1 >= 0) begin
        check(cyc - r1 == CPU, $sformatf("output1MHz period %0d clocks", cyc - r1));
        n1++;
      end
      r1 = cyc;
    end
  end

  // Printed table entries: pulse number (1-based), start and end in us within the period.
  typedef struct { int n; int a; int b; } printed_t;
  printed_t pr [2][15] = '{
    '{'{1, 240, 260}, '{2, 720, 780}, '{3, 1205, 1300}, '{10, 4625, 4875}, '{11, 5125, 5375},
      '{18, 8700, 8795}, '{19, 9220, 9280}, '{20, 9740, 9760}, '{21, 10240, 10260},
      '{22, 10720, 10780}, '{23, 11205, 11300}, '{30, 14625, 14875}, '{31, 15125, 15375},
      '{39, 19220, 19280}, '{40, 19740, 19760}},
    '{'{1, 235, 265}, '{2, 710, 795}, '{3, 1180, 1325}, '{10, 4565, 4940}, '{11, 5065, 5435},
      '{18, 8675, 8820}, '{19, 9205, 9290}, '{20, 9735, 9765}, '{21, 10235, 10265},
      '{22, 10710, 10795}, '{23, 11180, 11325}, '{30, 14565, 14940}, '{31, 15065, 15435},
      '{39, 19205, 19290}, '{40, 19735, 19765}}};

  initial begin
    longint base [2];
    automatic int seen_wrap = 0, seen_dead_mid = 0, seen_dead_end = 0;
    int     dead_us [2];
    dead_us[0] = 480;
    dead_us[1] = 470;

    for (int i = 0; i < 4; i++) prev[i] = 1'b0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    check(!s1_050 && !s3_050 && !s1_075 && !s3_075, "gates low in reset");
    @(negedge clk);
    rst = 1'b0;
    rel_cyc = cyc;

    wait (cyc - rel_cyc >= 2 * PER + 20_000);
    @(negedge clk);

    check(pair_mismatch == 0, $sformatf("S1/S2 or S3/S4 differ on %0d clocks", pair_mismatch));
    check(overlap == 0, $sformatf("pairs overlap on %0d clocks", overlap));

    for (int m = 0; m < 2; m++) begin
      automatic int p = 2 * m, q = 2 * m + 1;   // S1S2 and S3S4 logs of this index
      check(rise[p].size() == 41 && fall[p].size() == 41,
            $sformatf("ma%0d S1S2: %0d/%0d edges, expected 41", m, rise[p].size(), fall[p].size()));
      check(rise[q].size() == 40 && fall[q].size() == 40,
            $sformatf("ma%0d S3S4: %0d/%0d edges, expected 40", m, rise[q].size(), fall[q].size()));
      if (rise[p].size() < 41 || rise[q].size() < 40 || fall[p].size() < 41 || fall[q].size() < 40) continue;

      // Start of the first period: pulse 1 starts at its tabulated time (the time base leaves
      // reset at 0 and advances once per microsecond, the first step up to one us late).
      base[m] = rise[p][0] - longint'(pr[m][0].a) * CPU;
      check(base[m] >= 0 && base[m] <= 2 * CPU, $sformatf("ma%0d period starts %0d clocks after reset", m, base[m]));

      for (int k = 0; k < 2; k++) begin
        automatic longint b = base[m] + k * PER;
        // period: pulse 1 of period k+1 is exactly 20 ms after that of period k
        if (k == 1) begin
          check(rise[p][20] - rise[p][0] == PER, $sformatf("ma%0d period %0d clocks", m, rise[p][20] - rise[p][0]));
          seen_wrap++;
        end
        // pulses: all 20 of S1S2 in the first half, all of S3S4 in the second
        check(rise[p][20*k] - b < PER / 2 && fall[p][20*k+19] - b <= PER / 2, $sformatf("ma%0d S1S2 in first half", m));
        check(rise[q][20*k] - b >= PER / 2 && fall[q][20*k+19] - b <= PER, $sformatf("ma%0d S3S4 in second half", m));
        foreach (pr[m][i]) begin
          automatic int n  = pr[m][i].n;
          automatic int ix = (n <= 20) ? (n - 1) : (n - 21);
          automatic int lg = (n <= 20) ? p : q;
          check(rise[lg][20*k+ix] - b == longint'(pr[m][i].a) * CPU,
                $sformatf("ma%0d period %0d t%0d start %0d us", m, k, n, (rise[lg][20*k+ix] - b) / CPU));
          check(fall[lg][20*k+ix] - b == longint'(pr[m][i].b) * CPU,
                $sformatf("ma%0d period %0d t%0d end %0d us", m, k, n, (fall[lg][20*k+ix] - b) / CPU));
        end
        // dead time at mid-period (S1S2 off -> S3S4 on) and at the period end (S3S4 -> S1S2)
        check(rise[q][20*k] - fall[p][20*k+19] == longint'(dead_us[m]) * CPU,
              $sformatf("ma%0d mid-period dead time %0d us", m, (rise[q][20*k] - fall[p][20*k+19]) / CPU));
        seen_dead_mid++;
        check(rise[p][20*k+20] - fall[q][20*k+19] == longint'(dead_us[m]) * CPU,
              $sformatf("ma%0d end-of-period dead time %0d us", m, (rise[p][20*k+20] - fall[q][20*k+19]) / CPU));
        seen_dead_end++;
      end
    end

    $display("mechanisms: pulses S1S2/S3S4 ma0.5 %0d/%0d, ma0.75 %0d/%0d, period wraps %0d, dead times %0d+%0d, 1 MHz periods %0d, 25 MHz periods %0d",
             rise[0].size(), rise[1].size(), rise[2].size(), rise[3].size(), seen_wrap,
             seen_dead_mid, seen_dead_end, n1, n25);
    check(rise[0].size() > 0 && rise[1].size() > 0 && rise[2].size() > 0 && rise[3].size() > 0, "pulses on every output");
    check(seen_wrap == 2, "time-base wrap seen for both indices");
    check(seen_dead_mid > 0 && seen_dead_end > 0, "dead time seen at both boundaries");
    check(n1 > 1000 && n25 > 1000, "clock outputs running");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
