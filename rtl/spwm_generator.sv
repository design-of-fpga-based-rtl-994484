// spwm_generator: gate signals for a single-phase full-bridge inverter, 50 Hz sinusoidal PWM.
//
// The four switches of the bridge work in pairs: S1 and S2 conduct during the positive half of
// the 50 Hz reference, S3 and S4 during the negative half. Within its half, a pair is switched on
// by 20 pulses whose widths follow a sine (narrow at the zero crossings, widest at the peak), so
// the bridge output averages to a sinusoid. The pulse times are precomputed (see spwm_pkg) for
// two modulation indices, 0.5 and 0.75, and both patterns are produced at once on separate pins.
//
// Datapath, as in the original block diagram:
//   clockin50MHz -> altpll_model (c0 = 25 MHz, brought out as output25MHz)
//   clockin50MHz -> clock_divider -> 1 MHz square wave (output1MHz) and a 1 us strobe
//   two mod-20000 counters advanced by the 1 us strobe (0..19999 = one 20 ms period):
//     counter 0 feeds the two ma = 0.75 decoders, counter 1 the two ma = 0.5 decoders
//   four spwm_switch_decoder blocks; each output drives both switches of its pair.
// In the original the counters are clocked by the 1 MHz divided clock; here everything runs on
// the 50 MHz clock and the counters use the 1 us strobe as an enable (same count sequence, one
// clock domain). The reset input is also an addition of this implementation.
//
// Interface: clockin50MHz, rst (synchronous, active high), output25MHz, output1MHz, and
// s1..s4 for each modulation index. Timing: after reset is released the first period starts
// with the first 1 us strobe; a gate output follows its counter by one 50 MHz clock. The
// dead time between the pairs is 480 us (ma = 0.5) and 470 us (ma = 0.75) at each half-cycle
// boundary, set by the pulse table.
module spwm_generator
  import spwm_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000   // board clock; the time base is always 1 us
) (
  input  logic clockin50MHz,
  input  logic rst,
  output logic output25MHz,
  output logic output1MHz,
  output logic s1_ma050,
  output logic s2_ma050,
  output logic s3_ma050,
  output logic s4_ma050,
  output logic s1_ma075,
  output logic s2_ma075,
  output logic s3_ma075,
  output logic s4_ma075
);

  logic   clk;
  logic   tick_us;
  count_t count_ma075, count_ma050;
  logic   s1s2_ma075, s3s4_ma075, s1s2_ma050, s3s4_ma050;

  assign clk = clockin50MHz;

  altpll_model #(.DIVIDE_BY(2)) u_pll (
    .inclk0 (clk),
    .c0     (output25MHz)
  );

  // Only the 1 MHz output of the divider is used by the generator; the slower outputs exist in
  // the divider but have no load here.
  clock_divider #(.CLK_HZ(CLK_HZ), .FIRST_HZ(1_000_000)) u_clkdiv (
    .clk          (clk),
    .rst          (rst),
    .clock_1MHz   (output1MHz),
    .clock_100KHz (),
    .clock_10KHz  (),
    .clock_1KHz   (),
    .clock_100Hz  (),
    .clock_10Hz   (),
    .clock_1Hz    (),
    .tick_1MHz    (tick_us)
  );

  mod_counter #(.MODULUS(PERIOD_US), .WIDTH(COUNT_W)) u_counter0 (
    .clk (clk), .rst (rst), .en (tick_us), .q (count_ma075), .tc ()
  );

  mod_counter #(.MODULUS(PERIOD_US), .WIDTH(COUNT_W)) u_counter1 (
    .clk (clk), .rst (rst), .en (tick_us), .q (count_ma050), .tc ()
  );

  spwm_switch_decoder #(.MA(MA_075), .HALF(HALF_POS)) u_s1s2_ma075 (
    .clk (clk), .rst (rst), .count (count_ma075), .gate (s1s2_ma075)
  );
  spwm_switch_decoder #(.MA(MA_075), .HALF(HALF_NEG)) u_s3s4_ma075 (
    .clk (clk), .rst (rst), .count (count_ma075), .gate (s3s4_ma075)
  );
  spwm_switch_decoder #(.MA(MA_050), .HALF(HALF_POS)) u_s1s2_ma050 (
    .clk (clk), .rst (rst), .count (count_ma050), .gate (s1s2_ma050)
  );
  spwm_switch_decoder #(.MA(MA_050), .HALF(HALF_NEG)) u_s3s4_ma050 (
    .clk (clk), .rst (rst), .count (count_ma050), .gate (s3s4_ma050)
  );

  assign s1_ma075 = s1s2_ma075;
  assign s2_ma075 = s1s2_ma075;
  assign s3_ma075 = s3s4_ma075;
  assign s4_ma075 = s3s4_ma075;
  assign s1_ma050 = s1s2_ma050;
  assign s2_ma050 = s1s2_ma050;
  assign s3_ma050 = s3s4_ma050;
  assign s4_ma050 = s3s4_ma050;

  // The two switch pairs of the bridge must never conduct together.
  a_no_shoot_through_ma075: assert property (@(posedge clk) disable iff (rst)
    !(s1s2_ma075 && s3s4_ma075));
  a_no_shoot_through_ma050: assert property (@(posedge clk) disable iff (rst)
    !(s1s2_ma050 && s3s4_ma050));

endmodule
