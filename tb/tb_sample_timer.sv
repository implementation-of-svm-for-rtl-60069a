// tb_sample_timer - self-checking test of the sampling-period strobe.
//
// Runs the timer at its default 50 MHz / 5 us setting (250 cycles per sample)
// and checks: no strobe in reset or while stopped, the first strobe exactly
// 250 cycles after run rises, 250 cycles between strobes, strobes one cycle
// wide, and the same again after a stop and restart.
module tb_sample_timer;
  localparam int unsigned DIV = 250;  // 50 MHz * 5 us

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic tick;
  int checks = 0;
  int failures = 0;

  sample_timer dut (.clk, .rst_n, .run, .tick);

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Cycle counter and tick monitor, sampled at the falling edge so that the
  // registered counter has settled.
  int cyc = 0;
  int last_tick = 0;
  int ticks = 0;
  int wide = 0;
  bit prev_tick = 1'b0;
  always @(negedge clk) begin
    cyc++;
    if (tick) begin
      ticks++;
      last_tick = cyc;
    end
    if (tick && prev_tick) wide++;
    prev_tick = tick;
  end

  // Waits for the next tick; returns the number of cycles since `from`.
  task automatic cycles_to_tick(input int from, input int limit, output int n);
    int t0;
    t0 = ticks;
    n = -1;
    for (int i = 0; i < limit; i++) begin
      @(negedge clk);
      #1;
      if (ticks != t0) begin n = last_tick - from; return; end
    end
  endtask

  initial begin
    int n;
    int ticks_seen;
    repeat (5) @(posedge clk);
    check(tick == 1'b0, "no tick in reset");
    rst_n = 1'b1;
    repeat (600) begin
      @(posedge clk);
      check(tick == 1'b0, "no tick while stopped");
    end
    // start exactly after an edge
    @(posedge clk) #1 run = 1'b1;
    cycles_to_tick(cyc, DIV + 10, n);
    check(n == DIV, $sformatf("first tick after %0d cycles, expected %0d", n, DIV));
    for (int k = 0; k < 20; k++) begin
      cycles_to_tick(last_tick, DIV + 10, n);
      check(n == DIV, $sformatf("tick interval %0d, expected %0d", n, DIV));
    end
    check(wide == 0, "tick is one cycle wide");
    // stop mid-period
    repeat (37) @(posedge clk);
    @(negedge clk) run = 1'b0;
    ticks_seen = 0;
    repeat (3 * DIV) begin
      @(posedge clk);
      if (tick) ticks_seen++;
    end
    check(ticks_seen == 0, "no tick after stop");
    // restart: counter was cleared, so a full period to the first tick
    @(posedge clk) #1 run = 1'b1;
    cycles_to_tick(cyc, DIV + 10, n);
    check(n == DIV, $sformatf("first tick after restart after %0d cycles", n));
    cycles_to_tick(last_tick, DIV + 10, n);
    check(n == DIV, $sformatf("interval after restart %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
