// spwm_switch_decoder: gate signal of one switch pair for one modulation index.
//
// The decoder watches the 1 us time base (0..19999 over a 20 ms reference period) and drives its
// output high while the count lies inside one of the 20 pulse windows [alpha_n, beta_n) of its
// half cycle. The windows come from spwm_pkg (positive half for the S1-S2 pair, the same windows
// 10 ms later for the S3-S4 pair), so each decoder emits 20 pulses per period and stays low for
// the other half. The quiet stretch between the last pulse of one half and the first of the next
// (480 us at ma = 0.5, 470 us at ma = 0.75) is the dead time between the two switch pairs; it
// comes from the table, not from extra logic.
//
// Structure: 20 parallel window comparisons, OR-ed, then one output register. The original
// design describes this block only as a table-driven on/off decoder of the counter value; the
// parallel-window form and the output register (which keeps comparator glitches away from the
// gate drivers) are choices of this implementation.
//
// Interface: clk, synchronous active-high rst (output low), count (must stay below 20000),
// gate. Timing: gate follows count with one clock of latency.
module spwm_switch_decoder
  import spwm_pkg::*;
#(
  parameter mod_index_e MA   = MA_075,
  parameter half_e      HALF = HALF_POS
) (
  input  logic   clk,
  input  logic   rst,
  input  count_t count,
  output logic   gate
);

  logic in_window;

  always_comb begin
    in_window = 1'b0;
    for (int unsigned n = 0; n < PULSES_PER_HALF; n++) begin
      if (32'(count) >= pulse_alpha(MA, HALF, n) && 32'(count) < pulse_beta(MA, HALF, n))
        in_window = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) gate <= 1'b0;
    else     gate <= in_window;
  end

endmodule
