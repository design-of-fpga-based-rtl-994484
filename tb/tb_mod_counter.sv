// tb_mod_counter: self-checking test of the modulus-20000 time-base counter.
//
// The counter runs at its default modulus with a random enable (about half the clocks). A
// reference count kept in the testbench is compared with q on every clock; tc must be high
// exactly on the enabled clock at 19999, and the counter must wrap to 0 after it. Two full
// periods (40000 enabled clocks) are run, and a reset in mid-count is checked at the end.
module tb_mod_counter;

  localparam int unsigned MODULUS = 20000;

  logic        clk = 1'b0;
  logic        rst;
  logic        en;
  logic [14:0] q;
  logic        tc;

  int checks = 0, failures = 0;
  int ref_q = 0;
  int steps = 0, wraps = 0;

  always #5 clk = ~clk;

  mod_counter u_dut (.clk, .rst, .en, .q, .tc);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    en  = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(q == 0, "reset value");
    @(negedge clk);
    rst = 1'b0;

    while (steps < 2 * MODULUS) begin
      @(negedge clk);
      en = ($urandom_range(1, 0) == 1);
      #1;
      check(tc == (en && ref_q == MODULUS - 1), $sformatf("tc at q=%0d en=%0b", q, en));
      @(posedge clk); #1;
      if (en) begin
        steps++;
        if (ref_q == MODULUS - 1) begin
          ref_q = 0;
          wraps++;
        end else ref_q++;
      end
      check(32'(q) == ref_q, $sformatf("q=%0d expected %0d", q, ref_q));
    end
    check(wraps == 2, $sformatf("%0d wraps in two periods", wraps));

    // Reset in the middle of a period.
    @(negedge clk);
    en = 1'b1;
    repeat (123) @(posedge clk);
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk); #1;
    check(q == 0, "synchronous reset mid-count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
