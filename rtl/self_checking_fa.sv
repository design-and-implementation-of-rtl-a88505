// self_checking_fa: full adder whose sum and carry outputs are each checked
// by a small concurrent checker, so that a wrong output is flagged in the
// same cycle it appears, with its location (sum or carry).
//
// Carry checker. For a correct full adder the carry differs from the carry
// in exactly when a == b == ~cin, i.e. when F1 = a'b'cin + ab cin' is 1.
// So with G1 = cout ^ cin,  Fc = G1 ^ F1  is 0 for a correct carry and 1
// for a wrong one.
// Sum checker. For a correct adder sum ^ cin == a ^ b, so with
// G2 = ~(a ^ b) and G3 = ~(sum ^ cin),  Fs = G2 ^ G3  is 0 for a correct
// sum and 1 for a wrong one.
// The two checkers are independent, so a fault on both outputs at once (a
// double fault) raises both flags.
//
// Interface: a, b, cin in; sum, cout are the outputs of the adder cell after
// its fault sites (see fa_fault_pkg), fs and fc the fault flags. `fault` is
// FAULT_NONE for both sites in normal use. Purely combinational.
//
// The checker equations follow the published scheme; the fault-injection
// port is this design's own addition for exercising it.
module self_checking_fa
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

  logic sum_cell, cout_cell;  // outputs of the healthy adder cell
  logic g1, f1, g2, g3;

  gdi_full_adder u_fa (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (sum_cell),
    .cout (cout_cell)
  );

  always_comb begin
    // Fault sites at the adder cell's outputs.
    sum  = apply_fault(sum_cell,  fault.sum);
    cout = apply_fault(cout_cell, fault.cout);

    // Carry checker: eqs. G1, F1, Fc.
    g1 = (~cout) ^ (~cin);
    f1 = (~a & ~b & cin) | (a & b & ~cin);
    fc = g1 ^ f1;

    // Sum checker: eqs. G2, G3, Fs.
    g2 = ~(a ^ b);
    g3 = ~(sum ^ cin);
    fs = g2 ^ g3;
  end

endmodule
