// tb_altpll_model: self-checking test of the PLL model in its configured ratio (1/2).
//
// A 50 MHz reference (20 ns period, time unit 1 ns) drives the model. After the first output edge, every
// rising edge of c0 must coincide with a rising edge of inclk0 (0 degree phase), successive
// rising edges must be 40 ns apart (25 MHz) and c0 must stay high for 20 ns (50 % duty).
// A second instance with DIVIDE_BY = 4 checks the general even ratio.
module tb_altpll_model;

  logic inclk0 = 1'b0;
  logic c0, c0_div4;

  int checks = 0, failures = 0;
  int ref_edges = 0;
  realtime last_ref_rise = -1, last_rise = -1, last_fall = -1;
  realtime last_rise4 = -1;
  int rises = 0, rises4 = 0;

  always #10 inclk0 = ~inclk0;

  altpll_model u_dut (.inclk0, .c0);
  altpll_model #(.DIVIDE_BY(4)) u_div4 (.inclk0, .c0 (c0_div4));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge inclk0) begin
    last_ref_rise = $realtime;
    ref_edges++;
  end

  always @(posedge c0) begin
    check(last_ref_rise == $realtime, "c0 rises with inclk0");
    if (last_rise >= 0) begin
      check($realtime - last_rise == 40.0, $sformatf("c0 period %0t", $realtime - last_rise));
      check(last_fall - last_rise == 20.0, $sformatf("c0 high time %0t", last_fall - last_rise));
    end
    last_rise = $realtime;
    rises++;
  end

  always @(negedge c0) last_fall = $realtime;

  always @(posedge c0_div4) begin
    if (last_rise4 >= 0) check($realtime - last_rise4 == 80.0, "DIVIDE_BY=4 period");
    last_rise4 = $realtime;
    rises4++;
  end

  initial begin
    #20000;
    check(rises >= 490 && rises <= 510, $sformatf("%0d c0 periods in 1000 reference periods", rises));
    check(rises4 >= 245 && rises4 <= 255, $sformatf("%0d DIVIDE_BY=4 periods in 1000 reference periods", rises4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
