// 8-bit reversible LFSR unit: two 4-bit reversible LFSRs side by side.
//
// The low nibble of a pixel goes through lfsr_lo, the high nibble through
// lfsr_hi; both share the clock and the load control. The two registers do
// not interact, so the 8-bit transform is the 4-bit transform applied to each
// nibble. Timing is that of rev_lfsr4: four cycles with ctrl = 1 load a byte
// serially, least significant bit of each nibble first (din[0] feeds the low
// nibble, din[1] the high nibble); each cycle with ctrl = 0 is one step.
// The split of a pixel into two 4-bit LFSRs follows the published design;
// the separate control per nibble was merged into one here, since the
// controller always drives both the same.
module rev_lfsr8 (
  input  logic       clk,
  input  logic [1:0] din,    // {high-nibble bit, low-nibble bit}
  input  logic       ctrl,   // 1: load, 0: run
  output logic [7:0] dout
);

  rev_lfsr4 u_lfsr_lo (.clk(clk), .din(din[0]), .ctrl(ctrl), .dout(dout[3:0]));
  rev_lfsr4 u_lfsr_hi (.clk(clk), .din(din[1]), .ctrl(ctrl), .dout(dout[7:4]));

endmodule
