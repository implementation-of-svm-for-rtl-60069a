// tb_switch_memory - self-checking test of the switching-state table.
//
// Fills the full 4000 x 24 table with pseudo-random words kept in a reference
// array, then reads every entry back (registered read: data one clock after
// the address) in order and at random addresses, and checks that writing one
// entry leaves its neighbours alone. A second, 16-word instance checks the
// initial content read from switch_init_test.hex, whose word k is
// (k * 0x010101) xor 0xA5A5A5.
module tb_switch_memory;
  localparam int unsigned DEPTH = 4000;
  localparam int unsigned WIDTH = 24;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0;
  logic [AW-1:0] rd_addr = '0;
  logic [WIDTH-1:0] rd_data;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0;
  int failures = 0;

  switch_memory dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  logic [3:0]       i_rd_addr = '0;
  logic [WIDTH-1:0] i_rd_data;
  switch_memory #(.DEPTH(16), .INIT_FILE("tb/switch_init_test.hex")) dut_init (
    .clk, .wr_en(1'b0), .wr_addr('0), .wr_data('0), .rd_addr(i_rd_addr), .rd_data(i_rd_data)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic read_check(input int a);
    @(negedge clk) rd_addr = AW'(a);
    @(posedge clk) #1;
    check(rd_data == ref_mem[a], $sformatf("entry %0d: %h, expected %h", a, rd_data, ref_mem[a]));
  endtask

  initial begin
    for (int a = 0; a < 16; a++) begin
      @(negedge clk) i_rd_addr = 4'(a);
      @(posedge clk) #1;
      check(i_rd_data == WIDTH'((a * 24'h010101) ^ 24'hA5A5A5),
            $sformatf("initial entry %0d: %h", a, i_rd_data));
    end
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = WIDTH'($urandom);
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = ref_mem[a];
    end
    @(negedge clk) wr_en = 1'b0;
    for (int a = 0; a < DEPTH; a++) read_check(a);
    for (int k = 0; k < 500; k++) read_check($urandom_range(0, DEPTH - 1));
    // one cycle of latency: data does not change before the edge
    @(negedge clk) rd_addr = AW'(5);
    @(posedge clk) #1;
    @(negedge clk) rd_addr = AW'(6);
    #1 check(rd_data == ref_mem[5], "read data held until next edge");
    // single overwrite
    @(negedge clk);
    wr_en = 1'b1; wr_addr = AW'(100); wr_data = ~ref_mem[100];
    ref_mem[100] = ~ref_mem[100];
    @(negedge clk) wr_en = 1'b0;
    read_check(99);
    read_check(100);
    read_check(101);
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
