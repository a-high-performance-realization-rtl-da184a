// 4-bit reversible LFSR with serial load.
//
// A Fredkin gate picks the input of the first flip-flop: with ctrl = 1 it
// passes the serial input din, with ctrl = 0 the feedback bit. Four D
// flip-flops D1..D4 form a shift chain, and a Feynman gate forms the feedback
// Q3 xor Q4. The parallel output is dout = {Q1,Q2,Q3,Q4}, so one step moves
// every bit one place towards bit 0 and puts the feedback into bit 3. The
// feedback polynomial x^4 + x^3 + 1 is maximal: any non-zero state returns
// after 15 steps, and the all-zero state stays zero.
//
// Timing: the register moves on every rising clock edge, there is no
// enable. Holding ctrl = 1 for four cycles while din presents bits 0, 1, 2
// and 3 of a nibble leaves that nibble on dout. Each following cycle with
// ctrl = 0 advances the LFSR one step.
//
// Structure and port list (clk, din, ctrl, 4-bit output) follow the
// published design; which Fredkin output feeds D1 and the order of the
// output bits were chosen so that the output sequence 15, 7, 3, 1, 8, 4, ...
// of the published simulation is reproduced.
module rev_lfsr4 (
  input  logic       clk,
  input  logic       din,    // serial data input, used while ctrl = 1
  input  logic       ctrl,   // 1: load din, 0: run on feedback
  output logic [3:0] dout    // {Q1, Q2, Q3, Q4}
);

  logic q1, q2, q3, q4;
  logic d1;         // input of the first flip-flop
  logic q11;        // feedback, Q3 xor Q4

  fredkin_gate u_fred (.a(ctrl), .b(q11), .c(din), .p(), .q(d1), .r());

  rev_dff u_d1 (.clk(clk), .d(d1), .q(q1), .q_n());
  rev_dff u_d2 (.clk(clk), .d(q1), .q(q2), .q_n());
  rev_dff u_d3 (.clk(clk), .d(q2), .q(q3), .q_n());
  rev_dff u_d4 (.clk(clk), .d(q3), .q(q4), .q_n());

  feynman_gate u_fg (.a(q3), .b(q4), .p(), .q(q11));

  assign dout = {q1, q2, q3, q4};

endmodule
