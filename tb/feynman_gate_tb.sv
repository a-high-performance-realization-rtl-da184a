// Self-checking testbench of feynman_gate.
// Applies all four input patterns, compares p and q with the controlled-NOT
// truth table, checks that the outputs are all different and that a second
// gate in series restores the inputs.
module feynman_gate_tb;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;
  bit [3:0] seen;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (a=%0b b=%0b -> %0b%0b)", what, a, b, p, q);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      case (i)
        0: exp = 2'b00; 1: exp = 2'b01; 2: exp = 2'b11; 3: exp = 2'b10;
        default: exp = 'x;
      endcase
      check({p, q} == exp, "truth table");
      check(!seen[{p, q}], "outputs distinct");
      seen[{p, q}] = 1'b1;
      check({p2, q2} == {a, b}, "self-inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
