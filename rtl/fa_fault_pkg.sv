// fa_fault_pkg: fault model shared by the fault-tolerant adder cells and the
// multiplier built from them.
//
// Each full-adder cell has two fault sites, its sum output and its carry
// output. A site is either healthy, stuck at 0, stuck at 1 (permanent
// defects such as a broken or shorted node) or inverted (a transient upset,
// e.g. a particle strike). The fault-tolerance scheme checks and repairs the
// cell's outputs only, so these two sites are the whole fault model; the
// checkers and the repair multiplexers are taken as healthy.
//
// The fault controls exist to exercise the detection and repair logic; in
// normal operation every site is tied to FAULT_NONE. The choice of these four
// fault kinds, and bringing them in as a port, is this design's own.
package fa_fault_pkg;

  typedef enum logic [1:0] {
    FAULT_NONE   = 2'd0,  // output passes unchanged
    FAULT_STUCK0 = 2'd1,  // output forced to 0
    FAULT_STUCK1 = 2'd2,  // output forced to 1
    FAULT_FLIP   = 2'd3   // output inverted (transient upset)
  } fault_e;

  // Faults at the two outputs of one adder cell.
  typedef struct packed {
    fault_e sum;
    fault_e cout;
  } fa_fault_t;

  localparam fa_fault_t NO_FAULT = '{sum: FAULT_NONE, cout: FAULT_NONE};

  // Value seen downstream of a fault site whose healthy value is `good`.
  function automatic logic apply_fault(input logic good, input fault_e f);
    unique case (f)
      FAULT_NONE:   return good;
      FAULT_STUCK0: return 1'b0;
      FAULT_STUCK1: return 1'b1;
      FAULT_FLIP:   return ~good;
      default:      return good;
    endcase
  endfunction

endpackage
