// chmi_svm_pkg - shared constants and types of the FPGA switching-signal
// generator for a three-phase cascaded H-bridge multilevel inverter (CHMI).
//
// The inverter has three phases; each phase is a series string of CELLS
// H-bridge cells, each cell having four IGBTs. With CELLS = 2 a phase can
// produce five voltage levels (-2, -1, 0, +1, +2 times the cell DC voltage),
// which is the five-level configuration this design targets. CELLS = 1 gives
// the three-level inverter.
//
// Gate word layout (one bit per IGBT, 1 = conducting):
//   bit ((phase * CELLS + cell) * 4 + s), s = 0..3 for S1..S4,
//   phase 0/1/2 = a/b/c, cell 0 the cell nearest the neutral point.
// In each cell S1/S2 form the left leg (upper/lower) and S3/S4 the right leg.
// The layout and the numbering are this design's own choice.
package chmi_svm_pkg;

  localparam int unsigned PHASES            = 3;
  localparam int unsigned SWITCHES_PER_CELL = 4;
  localparam int unsigned CELLS_5L          = 2;   // five-level CHMI
  localparam int unsigned FUND_HZ           = 50;  // fundamental frequency
  localparam int unsigned DT_NS_DEFAULT     = 5000; // sampling time DT = 5 us

  // Gate bits of one H-bridge cell.
  typedef struct packed {
    logic s4;  // right leg, lower
    logic s3;  // right leg, upper
    logic s2;  // left leg, lower
    logic s1;  // left leg, upper
  } hbridge_gates_t;

  // Number of gate bits for a given number of cells per phase.
  function automatic int unsigned gate_bits(int unsigned cells);
    return PHASES * cells * SWITCHES_PER_CELL;
  endfunction

  // Samples in one fundamental period, e.g. 20 ms / 5 us = 4000.
  function automatic int unsigned samples_per_period(int unsigned dt_ns,
                                                     int unsigned fund_hz);
    return 1_000_000_000 / (fund_hz * dt_ns);
  endfunction

endpackage
