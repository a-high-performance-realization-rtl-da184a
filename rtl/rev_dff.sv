// D flip-flop of the reversible LFSR chain.
//
// q takes d on every rising clock edge; q_n is its complement. In the
// published schematic each flip-flop also has a complementary output that is
// left open (a garbage output of the reversible cell) and passes a copy of
// the clock on to the next stage; here all stages share one clock net, which
// is what those copies carry, so the copy is not brought out. There is no
// reset, as in the published 4-bit LFSR, which has only clock, data, control
// and the four outputs as pins: its contents are set by loading.
module rev_dff (
  input  logic clk,
  input  logic d,
  output logic q,
  output logic q_n   // complement, unused in the LFSR (garbage output)
);

  always_ff @(posedge clk) q <= d;

  assign q_n = ~q;

endmodule
