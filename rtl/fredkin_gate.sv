// Fredkin gate: the reversible 3-input, 3-output controlled swap.
//
// The control a passes straight through (p = a). When a is 0 the data
// inputs pass unchanged (q = b, r = c); when a is 1 they are swapped
// (q = c, r = b). The mapping is a permutation of the eight input
// patterns, so no information is lost. In the 4-bit LFSR the control is the
// load signal, b carries the feedback bit and c the serial data input, and
// q drives the first flip-flop. Purely combinational, no clock.
// The gate is named in the published LFSR schematic; its equations are the
// standard definition of the gate.
module fredkin_gate (
  input  logic a,   // control
  input  logic b,
  input  logic c,
  output logic p,   // = a
  output logic q,   // a ? c : b
  output logic r    // a ? b : c
);

  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (~a & c) | (a & b);
  end

endmodule
