// tb_sample_sequencer - self-checking test of the table address sequencer.
//
// Uses a short table (DEPTH = 7) and strobes at random gaps. A reference
// counter kept in the testbench predicts the address after each strobe and the
// wrap flag on the last entry; stopping must return the address to 0.
module tb_sample_sequencer;
  localparam int unsigned DEPTH = 7;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic tick = 1'b0;
  logic [AW-1:0] addr;
  logic wrap;
  int checks = 0;
  int failures = 0;
  int exp_addr = 0;
  int wraps = 0;

  sample_sequencer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .run, .tick, .addr, .wrap);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic strobe();
    @(negedge clk) tick = 1'b1;
    #1 check(wrap == (exp_addr == DEPTH - 1),
             $sformatf("wrap=%0d at addr %0d", wrap, addr));
    @(negedge clk) tick = 1'b0;
    exp_addr = (exp_addr == DEPTH - 1) ? 0 : exp_addr + 1;
    check(int'(addr) == exp_addr, $sformatf("addr %0d, expected %0d", addr, exp_addr));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(addr == '0, "address 0 after reset");
    // strobes while stopped are ignored
    @(negedge clk) tick = 1'b1;
    @(negedge clk) tick = 1'b0;
    check(addr == '0, "strobe ignored while stopped");
    run = 1'b1;
    for (int k = 0; k < 3 * DEPTH + 2; k++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      if (exp_addr == DEPTH - 1) wraps++;
      strobe();
    end
    check(wraps == 3, "three wraps seen");
    // without a strobe the address holds
    repeat (10) @(negedge clk);
    check(int'(addr) == exp_addr, "address holds without strobe");
    // stop resets to 0
    run = 1'b0;
    @(negedge clk);
    check(addr == '0, "stop returns address to 0");
    run = 1'b1;
    exp_addr = 0;
    strobe();
    strobe();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
