// baud_gen_tb -- self-checking test of the baud-rate generator.
//
// Two dividers run side by side, one at the default DIVISOR and one at 5.
// The bench measures the clock count from enable to the first tick and
// between ticks, checks that ticks are single-cycle pulses, and that
// dropping `en` stops the ticks and restarts the count.
module baud_gen_tb;

  localparam int unsigned D_SMALL = 5;
  localparam int unsigned D_FULL  = 54;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic tick_s, tick_f;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  baud_gen #(.DIVISOR(D_SMALL)) dut_s (.clk, .rst_n, .en, .tick(tick_s));
  baud_gen                      dut_f (.clk, .rst_n, .en, .tick(tick_f));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // clocks from now until the next tick of the chosen divider, sampled on
  // falling edges so that tick is stable
  task automatic cycles_to_tick(input bit full, output int n);
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!(full ? tick_f : tick_s) && n < 1000);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    int seen;
    rst_n = 1'b0;
    en    = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(!tick_s && !tick_f, "no tick while disabled");

    // first tick DIVISOR clocks after enable, then every DIVISOR clocks
    @(negedge clk) en = 1'b1;
    cycles_to_tick(1'b0, n);
    check(n == D_SMALL, $sformatf("first small tick after %0d, expected %0d", n, D_SMALL));
    for (int i = 0; i < 20; i++) begin
      @(negedge clk) check(!tick_s, "tick lasts one clock");
      cycles_to_tick(1'b0, n);
      check(n + 1 == D_SMALL, $sformatf("small period %0d, expected %0d", n + 1, D_SMALL));
    end

    // restart the full-size divider
    @(negedge clk) en = 1'b0;
    @(negedge clk) en = 1'b1;
    cycles_to_tick(1'b1, n);
    check(n == D_FULL, $sformatf("first full tick after %0d, expected %0d", n, D_FULL));
    for (int i = 0; i < 5; i++) begin
      cycles_to_tick(1'b1, n);
      check(n == D_FULL, $sformatf("full period %0d, expected %0d", n, D_FULL));
    end

    // disabled: no ticks at all for a long time
    @(negedge clk) en = 1'b0;
    seen = 0;
    repeat (200) begin
      @(posedge clk);
      if (tick_s || tick_f) seen++;
    end
    check(seen <= 1, $sformatf("%0d ticks while disabled", seen));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
