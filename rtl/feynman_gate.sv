// Feynman gate: the reversible 2-input, 2-output controlled NOT.
//
// p copies a, q is a xor b. The mapping is a permutation of the four input
// patterns. In the 4-bit LFSR a = Q3 and b = Q4, so q is the feedback bit.
// Purely combinational, no clock. The gate is named in the published LFSR
// schematic; its equations are the standard definition of the gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,   // = a
  output logic q    // = a ^ b
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
