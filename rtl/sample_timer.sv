// sample_timer - sampling-period strobe generator.
//
// The switching states of the space vector modulator are computed offline at a
// fixed sampling time DT and must be applied to the inverter at exactly that
// rate. This block divides the FPGA clock by DIV = CLK_HZ * DT_NS / 1e9 and
// emits a one-cycle `tick` at the end of each sampling period.
//
// Timing: the counter runs 0..DIV-1 while `run` is high and `tick` is high in
// the cycle the counter holds DIV-1. So the first tick comes DIV cycles after
// `run` rises, and then one every DIV cycles. While `run` is low the counter
// is held at zero and no tick is issued.
//
// DT = 5 us follows the source design. The 50 MHz clock and the run input are
// this design's own choices; the clock frequency was not given.
module sample_timer #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned DT_NS  = chmi_svm_pkg::DT_NS_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic tick
);
  localparam longint unsigned DIV = (longint'(CLK_HZ) * DT_NS) / 64'd1_000_000_000;
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  initial begin
    assert (DIV >= 2)
      else $error("sample_timer: DT must span at least two clock cycles");
  end

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cnt <= '0;
    else if (!run)                    cnt <= '0;
    else if (cnt == CW'(DIV - 1))     cnt <= '0;
    else                              cnt <= cnt + 1'b1;
  end

  assign tick = run && (cnt == CW'(DIV - 1));

endmodule
