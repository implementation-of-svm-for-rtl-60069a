// svm_fpga_player - FPGA switching-signal generator for a three-phase
// cascaded H-bridge multilevel inverter driven by space vector modulation.
//
// Multilevel space vector modulation is expensive to compute in real time, and
// a slow processor forces a long sampling time, which distorts the output. This
// design moves the whole computation offline: the modulator is evaluated at a
// sampling time of DT = 5 us, its switching states for one fundamental period
// are stored in on-chip memory, and the FPGA replays them to the IGBT gates at
// exactly the same DT, so the inverter sees the switching states of the model.
//
// Structure:
//   sample_timer     divides the clock into one strobe per DT
//   sample_sequencer steps the table address per strobe, wraps every period
//   switch_memory    DEPTH words of GATE_W gate bits (registered read)
//   gate register    loads the addressed word on each strobe and holds it for
//                    the whole sampling period
//
// Interface: `run` starts replay from the first sample (and while low the
// gates are all off and the sequence returns to sample 0). The memory is
// filled through the load port (`ld_en`, `ld_addr`, `ld_data`) or from
// INIT_FILE. `gates` drives the IGBT gate drivers (layout in chmi_svm_pkg).
// `sample_strobe` pulses in the first cycle a new word is on `gates`,
// `sample_idx` is that word's table index, `period_start` marks sample 0 and
// `period_end` marks sample DEPTH-1, the last of each fundamental period.
//
// Timing: with DIV = CLK_HZ * DT / 1 s (250 at the defaults), the first word
// is loaded onto `gates` at the DIV-th rising clock edge after `run` is seen
// high, and after that `gates` changes exactly every DIV cycles; one period of
// the table takes DEPTH * DIV cycles (20 ms).
//
// From the source design: the offline-computed, FPGA-stored switching data,
// DT = 5 us, the five-level (two cells per phase) inverter and the 50 Hz
// fundamental from which DEPTH = 4000 follows. This design's own choices: the
// 50 MHz clock, the gate word layout, the load port, the run input and
// switching all IGBTs off while stopped. No dead time is inserted here; the
// stored states are applied as they are.
module svm_fpga_player #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned DT_NS     = chmi_svm_pkg::DT_NS_DEFAULT,
  parameter int unsigned CELLS     = chmi_svm_pkg::CELLS_5L,
  parameter int unsigned DEPTH     = chmi_svm_pkg::samples_per_period(
                                       chmi_svm_pkg::DT_NS_DEFAULT, chmi_svm_pkg::FUND_HZ),
  parameter string       INIT_FILE = "",
  localparam int unsigned GATE_W   = chmi_svm_pkg::gate_bits(CELLS),
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  // table load port
  input  logic              ld_en,
  input  logic [AW-1:0]     ld_addr,
  input  logic [GATE_W-1:0] ld_data,
  // to the gate drivers
  output logic [GATE_W-1:0] gates,
  output logic              sample_strobe,
  output logic [AW-1:0]     sample_idx,
  output logic              period_start,
  output logic              period_end
);

  logic          tick;
  logic          wrap;
  logic [AW-1:0] addr;
  logic [GATE_W-1:0] rd_word;

  sample_timer #(.CLK_HZ(CLK_HZ), .DT_NS(DT_NS)) u_timer (
    .clk, .rst_n, .run, .tick
  );

  sample_sequencer #(.DEPTH(DEPTH)) u_seq (
    .clk, .rst_n, .run, .tick, .addr, .wrap
  );

  switch_memory #(.DEPTH(DEPTH), .WIDTH(GATE_W), .INIT_FILE(INIT_FILE)) u_mem (
    .clk,
    .wr_en   (ld_en),
    .wr_addr (ld_addr),
    .wr_data (ld_data),
    .rd_addr (addr),
    .rd_data (rd_word)
  );

  // The read address changes only on a tick and ticks are at least two
  // cycles apart, so rd_word is settled for the addressed entry at each tick.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gates         <= '0;
      sample_strobe <= 1'b0;
      sample_idx    <= '0;
      period_start  <= 1'b0;
      period_end    <= 1'b0;
    end else if (!run) begin
      gates         <= '0;
      sample_strobe <= 1'b0;
      sample_idx    <= '0;
      period_start  <= 1'b0;
      period_end    <= 1'b0;
    end else begin
      sample_strobe <= tick;
      period_start  <= tick && (addr == '0);
      period_end    <= wrap;
      if (tick) begin
        gates      <= rd_word;
        sample_idx <= addr;
      end
    end
  end

endmodule
