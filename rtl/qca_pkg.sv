// qca_pkg: types and constants shared by the QCA comparator RTL.
//
// A QCA cell stores one bit as its polarization: P = +1 is logic 1 and
// P = -1 is logic 0. Every single-bit signal in this RTL stands for the
// polarization of one cell or of one line of cells.
//
// Circuits are timed by a four-phase clock. The layout is cut into four
// clock zones; zone k runs one phase behind zone k-1. In each zone the
// phases follow each other as Switch (cells take a new value), Hold (cells
// keep it and drive the next zone), Release (cells lose it) and Relax
// (cells stay unpolarized). The phase names and their order follow the
// QCA clocking scheme; the two-bit encoding is this design's own.
package qca_pkg;

  // Number of clock zones, one per clock phase.
  localparam int unsigned NUM_ZONES = 4;

  // Phase of a clock zone, in the order the phases follow each other.
  typedef enum logic [1:0] {
    PH_SWITCH  = 2'd0,
    PH_HOLD    = 2'd1,
    PH_RELEASE = 2'd2,
    PH_RELAX   = 2'd3
  } qca_phase_e;

  // Result of a 1-bit comparison: exactly one flag is set.
  typedef struct packed {
    logic l;  // A < B
    logic e;  // A = B
    logic g;  // A > B
  } cmp_result_t;

  // Polarization of a cell that encodes bit b: +1 for 1, -1 for 0.
  function automatic int polarization(input logic b);
    return b ? 1 : -1;
  endfunction

  // Fixed-polarization cells used to turn a majority gate into AND or OR.
  localparam logic FIXED_NEG = 1'b0;  // P = -1
  localparam logic FIXED_POS = 1'b1;  // P = +1

endpackage
