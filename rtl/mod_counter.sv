// mod_counter: enabled up counter with a programmable modulus (the time base of the generator).
//
// At its default modulus of 20000 and an enable strobe once per microsecond, the counter runs
// 0, 1, ..., 19999, 0, ... and so spans exactly one 20 ms period of the 50 Hz reference; its value
// is the time in microseconds since the start of the period. The original design uses a vendor
// up counter (modulus 20000, 15-bit output) clocked by a 1 MHz divided clock. Here the counter
// runs on the system clock and advances only on the enable strobe, which gives the same count
// sequence in a single clock domain; this is a choice of this implementation, as is the
// terminal-count output tc.
//
// Interface: clk, synchronous active-high rst (count to 0), en (advance by one), q (count),
// tc (high while q = MODULUS-1 and en is high, i.e. on the cycle the counter wraps).
// Timing: q changes on the clock edge where en is high.
module mod_counter #(
  parameter int unsigned MODULUS = 20000,
  parameter int unsigned WIDTH   = (MODULUS > 1) ? $clog2(MODULUS) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic             tc
);

  if (MODULUS < 2 || 64'(MODULUS) > (64'd1 << WIDTH)) begin : g_param_check
    $error("mod_counter: MODULUS must be at least 2 and fit in WIDTH bits");
  end

  localparam logic [WIDTH-1:0] LAST = WIDTH'(MODULUS - 1);

  assign tc = en && (q == LAST);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (tc)   q <= '0;
    else if (en)   q <= q + 1'b1;
  end

endmodule
