// Self-checking testbench of fredkin_gate.
// Applies all eight input patterns, compares p, q, r with the controlled-swap
// truth table, checks that the eight output patterns are all different
// (the gate is reversible) and that a second gate in series restores the
// inputs (the gate is its own inverse).
module fredkin_gate_tb;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  fredkin_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (a=%0b b=%0b c=%0b -> %0b%0b%0b)", what, a, b, c, p, q, r);
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
    logic [2:0] exp;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      // truth table written out: a=0 passes b,c; a=1 swaps them
      case (i)
        0: exp = 3'b000; 1: exp = 3'b001; 2: exp = 3'b010; 3: exp = 3'b011;
        4: exp = 3'b100; 5: exp = 3'b110; 6: exp = 3'b101; 7: exp = 3'b111;
        default: exp = 'x;
      endcase
      check({p, q, r} == exp, "truth table");
      check(!seen[{p, q, r}], "outputs distinct");
      seen[{p, q, r}] = 1'b1;
      check({p2, q2, r2} == {a, b, c}, "self-inverse");
    end
    check(seen == 8'hFF, "all output patterns reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
