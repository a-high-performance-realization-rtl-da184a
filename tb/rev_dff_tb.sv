// Self-checking testbench of rev_dff.
// Drives random data, checks after every rising edge that q holds the value
// d had before the edge and that q_n is its complement, and that q does not
// change between edges.
module rev_dff_tb;
  logic clk = 0, d, q, q_n;
  int checks = 0, failures = 0;

  rev_dff dut (.clk(clk), .d(d), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    d = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      d   = 1'($urandom);
      exp = d;
      #2;
      d   = ~exp;              // a late change after the edge must not matter
      #1;
      d   = exp;
      @(posedge clk);
      #1;
      check(q == exp, "q captures d");
      check(q_n == ~exp, "q_n is the complement");
      d = ~d;                  // change between edges: q must hold
      #2;
      check(q == exp, "q holds between edges");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
