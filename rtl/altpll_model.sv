// altpll_model: behavioural model of the FPGA's PLL as configured in this design.
//
// The real part is an analog phase-locked loop (vendor megafunction) set to a clock ratio of 1/2,
// 0 degree phase shift and 50 % duty cycle, turning the 50 MHz board clock into 25 MHz. This
// model reproduces only that configured output: c0 changes state on every rising edge of inclk0,
// so its rising edges line up with every second rising edge of inclk0 and it is high for exactly
// one input period. It has no VCO, no lock time and no jitter, and it supports only ratios 1/N
// with N even (DIVIDE_BY), which covers the configuration used here. In an FPGA build the vendor
// PLL takes its place.
//
// Interface: inclk0 (reference clock), c0 (output clock), the two pins of the original symbol.
// c0 starts low; the model needs no reset.
module altpll_model #(
  parameter int unsigned DIVIDE_BY = 2    // output frequency = inclk0 frequency / DIVIDE_BY
) (
  input  logic inclk0,
  output logic c0
);

  if (DIVIDE_BY < 2 || DIVIDE_BY % 2 != 0) begin : g_param_check
    $error("altpll_model: DIVIDE_BY must be even and at least 2");
  end

  localparam int unsigned HALF = DIVIDE_BY / 2;
  localparam int unsigned W    = (HALF > 1) ? $clog2(HALF) : 1;

  logic [W-1:0] edges = '0;   // rising edges of inclk0 since c0 last changed
  logic         c0_q  = 1'b0;

  assign c0 = c0_q;

  always_ff @(posedge inclk0) begin
    if (32'(edges) == HALF - 1) begin
      edges <= '0;
      c0_q  <= ~c0_q;
    end else begin
      edges <= edges + 1'b1;
    end
  end

endmodule
