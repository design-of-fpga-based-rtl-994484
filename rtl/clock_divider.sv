// clock_divider: derives 1 MHz, 100 kHz, 10 kHz, 1 kHz, 100 Hz, 10 Hz and 1 Hz from the board clock.
//
// A first counter divides the input clock (50 MHz by default) by CLK_HZ / 1 MHz; six decade
// counters follow, each advancing once per wrap of the stage before it. Every stage drives a
// square-wave output that is high for the first half of its count, so each output has a 50 % duty
// cycle when its division ratio is even. The 1 MHz stage also provides tick_1MHz, a one-clock
// strobe once per microsecond, which the generator uses as the enable of its time base instead
// of clocking logic from a divided clock.
//
// The set of output frequencies follows the original design's divider; its internals (a counter
// chain, registered outputs, the extra strobe) are choices of this implementation.
//
// Interface: clk, synchronous active-high rst (counters to 0, square waves high, as at the start
// of a period), seven square-wave outputs, tick_1MHz. Timing: square waves and the strobe are
// registered; tick_1MHz is high for one clock every CLK_HZ/1 MHz clocks, the first time
// CLK_HZ/1 MHz clocks after reset is released.
module clock_divider #(
  parameter int unsigned CLK_HZ   = 50_000_000,
  parameter int unsigned FIRST_HZ = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic clock_1MHz,
  output logic clock_100KHz,
  output logic clock_10KHz,
  output logic clock_1KHz,
  output logic clock_100Hz,
  output logic clock_10Hz,
  output logic clock_1Hz,
  output logic tick_1MHz
);

  localparam int unsigned DIV0    = CLK_HZ / FIRST_HZ;
  localparam int unsigned W0      = (DIV0 > 1) ? $clog2(DIV0) : 1;
  localparam int unsigned DECADES = 6;

  if (DIV0 < 2 || DIV0 * FIRST_HZ != CLK_HZ) begin : g_param_check
    $error("clock_divider: CLK_HZ must be an integer multiple (at least 2) of FIRST_HZ");
  end

  // Stage 0: divide by DIV0.
  logic [W0-1:0] cnt0;
  logic          wrap0;
  logic          sq0;
  logic [DECADES:0] sq;      // square waves, [0] = 1 MHz ... [6] = 1 Hz
  logic [DECADES:0] wrap;    // stage i completes a period on this clock

  assign wrap0   = (cnt0 == W0'(DIV0 - 1));
  assign wrap[0] = wrap0;
  assign sq[0]   = sq0;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt0  <= '0;
      sq0   <= 1'b1;
    end else begin
      cnt0  <= wrap0 ? '0 : cnt0 + 1'b1;
      // high for the first DIV0/2 input clocks of each output period
      sq0   <= wrap0 ? 1'b1 : ((32'(cnt0) + 1) < DIV0 / 2);
    end
  end

  // Stages 1..6: decade counters advanced by the previous stage's wrap.
  for (genvar i = 1; i <= DECADES; i++) begin : g_decade
    logic [3:0] cnt;
    logic       sq_q;
    assign wrap[i] = wrap[i-1] && (cnt == 4'd9);
    assign sq[i]   = sq_q;

    always_ff @(posedge clk) begin
      if (rst) begin
        cnt   <= '0;
        sq_q  <= 1'b1;
      end else if (wrap[i-1]) begin
        cnt   <= wrap[i] ? 4'd0 : cnt + 4'd1;
        // next count value below 5 -> high half of the period
        sq_q  <= wrap[i] || (cnt < 4'd4);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) tick_1MHz <= 1'b0;
    else     tick_1MHz <= wrap0;
  end

  assign clock_1MHz   = sq[0];
  assign clock_100KHz = sq[1];
  assign clock_10KHz  = sq[2];
  assign clock_1KHz   = sq[3];
  assign clock_100Hz  = sq[4];
  assign clock_10Hz   = sq[5];
  assign clock_1Hz    = sq[6];

endmodule
