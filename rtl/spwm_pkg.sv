// spwm_pkg: shared types and the switching-time table of the SPWM generator.
//
// The generator produces a 50 Hz sinusoidal PWM pattern by decoding a 1 us time base that counts
// 0..19999 over one 20 ms reference period. Each half period holds 20 gate pulses; pulse n of the
// positive half is on for alpha_n <= t < beta_n (microseconds). The negative half repeats the same
// pulses shifted by 10 ms (t21..t40 = t1..t20 + 10000 us).
//
// How the table is obtained (natural sampling): the carrier is a triangle between 0 and 1 with a
// period of 9 degrees of the reference (20 carrier periods per half cycle), reaching 0 at
// 4.5 + 9(n-1) degrees. Pulse n is on while ma*sin(theta) exceeds the carrier, so its edges solve
//     |theta - (4.5 + 9(n-1))| / 4.5 = ma * sin(theta).
// Each edge angle is rounded to the nearest multiple of 0.09 degrees and converted to time with
// t = theta * (10 ms / 180 deg), giving multiples of 5 us. The one exception is the end of pulse
// 10 at ma = 0.75, whose exact crossing (88.874 deg) lies almost on a rounding boundary: the
// published table places it at 88.92 deg (4940 us), and that value is used here.
//
// Only the modulation indices 0.5 and 0.75 are provided, as in the original design; a new index
// needs a new pair of rows computed with the formula above.
package spwm_pkg;

  // Time base: one count per microsecond, one reference period per counter cycle.
  localparam int unsigned COUNT_W        = 15;
  localparam int unsigned PERIOD_US      = 20000;   // 1 / 50 Hz
  localparam int unsigned HALF_PERIOD_US = PERIOD_US / 2;
  localparam int unsigned PULSES_PER_HALF = 20;

  typedef logic [COUNT_W-1:0] count_t;

  // Modulation index of a decoder and the half cycle (switch pair) it serves.
  typedef enum logic {MA_050, MA_075} mod_index_e;
  typedef enum logic {HALF_POS, HALF_NEG} half_e;   // HALF_POS: S1-S2, HALF_NEG: S3-S4

  typedef int unsigned edge_table_t [PULSES_PER_HALF];

  // Pulse start (alpha) and end (beta) times of the positive half cycle, in microseconds.
  localparam edge_table_t ALPHA_MA050 = '{
      240,  720, 1205, 1685, 2170, 2655, 3145, 3635, 4130, 4625,
     5125, 5625, 6135, 6640, 7155, 7665, 8180, 8700, 9220, 9740};
  localparam edge_table_t BETA_MA050 = '{
      260,  780, 1300, 1820, 2335, 2845, 3360, 3865, 4375, 4875,
     5375, 5870, 6365, 6855, 7345, 7830, 8315, 8795, 9280, 9760};
  localparam edge_table_t ALPHA_MA075 = '{
      235,  710, 1180, 1655, 2135, 2615, 3095, 3580, 4070, 4565,
     5065, 5565, 6075, 6585, 7100, 7625, 8145, 8675, 9205, 9735};
  localparam edge_table_t BETA_MA075 = '{
      265,  795, 1325, 1855, 2375, 2900, 3415, 3925, 4435, 4940,
     5435, 5930, 6420, 6905, 7385, 7865, 8345, 8820, 9290, 9765};

  // Start time of pulse n (0-based) of the given index and half, in microseconds.
  function automatic int unsigned pulse_alpha(mod_index_e ma, half_e half, int unsigned n);
    int unsigned base;
    base = (ma == MA_050) ? ALPHA_MA050[n] : ALPHA_MA075[n];
    return (half == HALF_POS) ? base : base + HALF_PERIOD_US;
  endfunction

  // End time (first microsecond off) of pulse n (0-based).
  function automatic int unsigned pulse_beta(mod_index_e ma, half_e half, int unsigned n);
    int unsigned base;
    base = (ma == MA_050) ? BETA_MA050[n] : BETA_MA075[n];
    return (half == HALF_POS) ? base : base + HALF_PERIOD_US;
  endfunction

endpackage
