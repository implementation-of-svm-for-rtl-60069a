// tb_svm_fpga_player - end-to-end test of the switching-signal generator at
// its default size: 50 MHz clock, DT = 5 us (250 cycles), five-level inverter
// (24 gate bits), one 50 Hz period of 4000 samples.
//
// The testbench computes a five-level switching table for modulation index
// 0.9: each phase reference 2*M*sin(2*pi*k/4000 - p*2*pi/3) is rounded to the
// nearest level and split over the two cells (cell 0 uses the upper zero state,
// cell 1 the lower one). This is a stand-in for the offline space vector
// modulator, whose output the hardware replays; the hardware does not depend
// on how the table was made. The table is written through the load port, then
// the generator runs one full period and some samples more, is stopped and
// restarted.
//
// Checked at every sample: the word on the gates equals the table entry of
// the expected index, the strobe comes exactly 250 cycles after the previous
// one (and 250 after run rises), period_start/period_end mark samples 0 and 3999,
// the power-stage model sees the expected phase levels and no shoot-through,
// and the gates are all off while stopped. Counted mechanisms, each of which
// must occur: sample strobes, period wrap, stop with gates off, restart from
// sample 0, and each of the five phase voltage levels.
module tb_svm_fpga_player;
  import chmi_svm_pkg::*;

  localparam int unsigned DEPTH  = 4000;
  localparam int unsigned DIV    = 250;
  localparam int unsigned CELLS  = 2;
  localparam int unsigned GATE_W = 3 * 4 * CELLS;
  localparam int          NLEV   = 2 * CELLS + 1;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam real         MI     = 0.9;
  localparam real         PI     = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic ld_en = 1'b0;
  logic [AW-1:0] ld_addr = '0;
  logic [GATE_W-1:0] ld_data = '0;
  logic [GATE_W-1:0] gates;
  logic sample_strobe;
  logic [AW-1:0] sample_idx;
  logic period_start;
  logic period_end;

  int level [3];
  logic shoot_through;
  logic undefined_state;

  logic [GATE_W-1:0] table_w [DEPTH];
  int                table_l [DEPTH][3];

  int checks = 0;
  int failures = 0;
  int n_strobes = 0;
  int n_wraps = 0;
  int n_stops = 0;
  int n_restarts = 0;
  int n_level [NLEV] = '{default: 0};

  svm_fpga_player dut (
    .clk, .rst_n, .run, .ld_en, .ld_addr, .ld_data,
    .gates, .sample_strobe, .sample_idx, .period_start, .period_end
  );

  chmi_power_stage_model #(.CELLS(CELLS)) u_stage (
    .gates, .level, .shoot_through, .undefined_state
  );

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [3:0] cell_word(input int v, input bit upper_zero);
    if (v > 0) return 4'b1001;
    if (v < 0) return 4'b0110;
    return upper_zero ? 4'b0101 : 4'b1010;
  endfunction

  task automatic build_table();
    for (int k = 0; k < int'(DEPTH); k++) begin
      logic [GATE_W-1:0] w;
      w = '0;
      for (int p = 0; p < 3; p++) begin
        real r;
        int l;
        r = real'(CELLS) * MI * $sin(2.0 * PI * k / DEPTH - p * 2.0 * PI / 3.0);
        l = (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
        if (l > int'(CELLS)) l = CELLS;
        if (l < -int'(CELLS)) l = -CELLS;
        table_l[k][p] = l;
        // cell c conducts +1/-1 when |level| > c; even cells use the upper
        // zero state, odd cells the lower one
        for (int c = 0; c < int'(CELLS); c++)
          w[(p * CELLS + c) * 4 +: 4] =
            cell_word((l > c) ? 1 : (l < -c) ? -1 : 0, (c % 2) == 0);
      end
      table_w[k] = w;
    end
  endtask

  // Cycle counter, sampled at the falling edge.
  int cyc = 0;
  always @(negedge clk) cyc++;

  // Waits for the next sample strobe and checks it against sample `k`;
  // `gap` is the expected number of cycles since cycle `from`.
  task automatic expect_sample(input int k, input int from, input int gap, output int at);
    int t0;
    t0 = cyc;
    at = -1;
    while (cyc - t0 < int'(2 * DIV)) begin
      @(negedge clk);
      if (sample_strobe) begin
        at = cyc;
        break;
      end
    end
    check(at >= 0, $sformatf("strobe for sample %0d missing", k));
    if (at < 0) return;
    n_strobes++;
    check(at - from == gap, $sformatf("sample %0d came after %0d cycles, expected %0d",
                                      k, at - from, gap));
    check(int'(sample_idx) == k, $sformatf("sample index %0d, expected %0d", sample_idx, k));
    check(gates == table_w[k], $sformatf("sample %0d gates %h, expected %h",
                                         k, gates, table_w[k]));
    check(period_start == (k == 0), $sformatf("period_start at sample %0d", k));
    check(period_end == (k == int'(DEPTH) - 1), $sformatf("period_end at sample %0d", k));
    check(!shoot_through && !undefined_state, $sformatf("invalid cell state at sample %0d", k));
    for (int p = 0; p < 3; p++) begin
      check(level[p] == table_l[k][p], $sformatf("sample %0d phase %0d level %0d, expected %0d",
                                                 k, p, level[p], table_l[k][p]));
      if (p == 0 && level[p] >= -int'(CELLS) && level[p] <= int'(CELLS))
        n_level[level[p] + int'(CELLS)]++;
    end
    if (k == int'(DEPTH) - 1) n_wraps++;
  endtask

  initial begin
    int at;
    int prev;
    build_table();
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // load the table through the load port
    for (int k = 0; k < int'(DEPTH); k++) begin
      @(negedge clk);
      ld_en = 1'b1;
      ld_addr = AW'(k);
      ld_data = table_w[k];
    end
    @(negedge clk) ld_en = 1'b0;
    check(gates == '0, "gates off before run");

    // run one full period and 10 samples of the next
    @(negedge clk);
    run = 1'b1;
    prev = cyc;
    expect_sample(0, prev, DIV, at);
    prev = at;
    for (int k = 1; k < int'(DEPTH) + 10; k++) begin
      expect_sample(k % DEPTH, prev, DIV, at);
      prev = at;
      // gates held steady between strobes (checked mid-period)
      if (k % 97 == 0) begin
        repeat (DIV / 2) @(negedge clk);
        check(gates == table_w[k % DEPTH] && !sample_strobe, "gates held within the sample");
      end
    end

    // stop in the middle of a sample: all IGBTs off, no strobes
    repeat (100) @(negedge clk);
    run = 1'b0;
    @(negedge clk);
    begin
      int strobes_seen;
      bit all_off;
      strobes_seen = 0;
      all_off = 1'b1;
      repeat (3 * DIV) begin
        @(negedge clk);
        if (sample_strobe) strobes_seen++;
        if (gates != '0) all_off = 1'b0;
      end
      check(strobes_seen == 0 && all_off, "stopped: no strobes, gates off");
      if (strobes_seen == 0 && all_off) n_stops++;
    end

    // restart: replay begins again at sample 0
    run = 1'b1;
    prev = cyc;
    expect_sample(0, prev, DIV, at);
    if (at >= 0 && sample_idx == '0) n_restarts++;
    prev = at;
    for (int k = 1; k < 20; k++) begin
      expect_sample(k, prev, DIV, at);
      prev = at;
    end

    check(n_strobes >= int'(DEPTH), $sformatf("sample strobes: %0d", n_strobes));
    check(n_wraps >= 1, "period wrap happened");
    check(n_stops >= 1, "stop with gates off happened");
    check(n_restarts >= 1, "restart from sample 0 happened");
    for (int l = 0; l < NLEV; l++) begin
      check(n_level[l] > 0, $sformatf("phase level %0d never produced", l - int'(CELLS)));
      $display("phase a level %0d: %0d samples", l - int'(CELLS), n_level[l]);
    end
    $display("mechanisms: strobes=%0d wraps=%0d stops=%0d restarts=%0d",
             n_strobes, n_wraps, n_stops, n_restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
