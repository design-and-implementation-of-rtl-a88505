// self_repairing_fa: self-checking full adder with output repair.
//
// A single-bit output can only be wrong in one way, so once the checker
// says it is wrong its inverse is right. Each output therefore has an
// inverter and a 2:1 multiplexer: when the fault flag (fs for the sum, fc
// for the carry) is 1 the multiplexer passes the inverted output, otherwise
// the adder's own output. Faults on the sum, on the carry, or on both at
// once (single and double faults, permanent or transient) are corrected
// without stopping or retrying the operation.
//
// Interface: a, b, cin in; sum, cout are the repaired outputs; fs, fc are
// the checker flags, brought out so that a system can log or count faults
// (this design's choice; the repair itself needs no one to read them).
// `fault` places faults at the adder cell's outputs and is FAULT_NONE in
// normal use. Purely combinational: the repaired output settles one
// checker-plus-multiplexer delay after the adder's.
module self_repairing_fa
  import fa_fault_pkg::*;
(
  input  logic      a,
  input  logic      b,
  input  logic      cin,
  input  fa_fault_t fault,
  output logic      sum,
  output logic      cout,
  output logic      fs,
  output logic      fc
);

  logic sum_chk, cout_chk;

  self_checking_fa u_check (
    .a     (a),
    .b     (b),
    .cin   (cin),
    .fault (fault),
    .sum   (sum_chk),
    .cout  (cout_chk),
    .fs    (fs),
    .fc    (fc)
  );

  // Inverter plus 2:1 multiplexer per output, selected by its fault flag.
  always_comb begin
    sum  = fs ? ~sum_chk  : sum_chk;
    cout = fc ? ~cout_chk : cout_chk;
  end

endmodule
