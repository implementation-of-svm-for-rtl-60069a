// switch_memory - on-chip table of IGBT switching states.
//
// One word per sample holds the gate bit of every IGBT of the inverter (24 bits
// for the three-phase five-level cascaded H-bridge inverter, layout in
// chmi_svm_pkg). The words are computed offline by the space vector modulator
// at the sampling time DT and placed in the FPGA, either as the memory's
// initial content (INIT_FILE, read with $readmemh) or through the write port.
//
// Interface and timing: a simple dual-port RAM. A write with `wr_en` high
// stores `wr_data` at `wr_addr` at the clock edge. The read is registered:
// `rd_data` shows the word at `rd_addr` one clock after the address is
// presented. There is no reset on the array, as in an FPGA block RAM.
//
// Storing precomputed switching data in the FPGA follows the source design;
// the word layout, the write port and the registered read are this design's
// own choices.
module switch_memory #(
  parameter int unsigned DEPTH     = 4000,
  parameter int unsigned WIDTH     = chmi_svm_pkg::gate_bits(chmi_svm_pkg::CELLS_5L),
  parameter string       INIT_FILE = "",
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
