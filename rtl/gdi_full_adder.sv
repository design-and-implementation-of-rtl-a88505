// gdi_full_adder: one-bit full adder, the arithmetic core of every cell.
//
//   sum  = a ^ b ^ cin
//   cout = a&b | b&cin | cin&a
//
// In silicon this cell is a gate-diffusion-input (GDI) circuit of about ten
// transistors, which is where the area, delay and power savings of the
// fault-tolerant adder come from. At the logic level only its function
// matters; the carry is written in the multiplexer form a GDI cell uses
// (propagate = a ^ b selects cin, otherwise a), which is equal to the
// majority function above. Purely combinational, no clock.
module gdi_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic propagate;

  always_comb begin
    propagate = a ^ b;
    sum       = propagate ^ cin;
    cout      = propagate ? cin : a;
  end

endmodule
