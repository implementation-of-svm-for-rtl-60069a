// sample_sequencer - steps through the stored switching-state table.
//
// The switching table holds DEPTH samples, one fundamental period of the
// output voltage (20 ms at 50 Hz divided by DT = 5 us gives 4000 samples).
// `addr` is the table entry that the next sample strobe will apply. On every
// `tick` it advances by one and wraps from DEPTH-1 back to 0, so the table is
// replayed cyclically for as long as `run` is high. `wrap` is high together
// with the tick that applies entry DEPTH-1, i.e. the last sample of a period.
// While `run` is low the address is held at 0, so every start begins at the
// first sample of the period.
//
// Cyclic replay of one stored period follows the source design, which stores
// the switching data computed offline and outputs it at the sampling time DT;
// the table depth is derived from its 50 Hz fundamental. The run/restart
// behaviour is this design's own choice.
module sample_sequencer #(
  parameter int unsigned DEPTH = 4000,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          tick,
  output logic [AW-1:0] addr,
  output logic          wrap
);

  assign wrap = tick && (addr == AW'(DEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     addr <= '0;
    else if (!run)  addr <= '0;
    else if (wrap)  addr <= '0;
    else if (tick)  addr <= addr + 1'b1;
  end

endmodule
