// Self-checking testbench of rev_lfsr4.
//  1. Holds din = 1 with ctrl = 1 for four cycles, then runs the LFSR and
//     compares dout with the free-running sequence 15, 7, 3, 1, 8, 4, 2, 9,
//     12, 6, 11, 5, 10, 13, 14, 15 (period 15).
//  2. Loads 12 serially, runs 7 steps and expects 15; loads 15, runs 8
//     steps and expects 12 again.
//  3. For every nibble: loads it (dout must equal it after exactly four
//     load cycles), runs 7 steps and compares with the cipher table below,
//     then loads the cipher nibble, runs 8 steps and expects the original.
//  4. Checks that the all-zero state stays zero.
// The expected numbers are written out here and not derived from the RTL.
module rev_lfsr4_tb;
  logic       clk = 0, din, ctrl;
  logic [3:0] dout;
  int checks = 0, failures = 0;

  // nibble -> nibble after loading and 7 steps
  localparam logic [3:0] ENC_MAP [16] = '{4'd0, 4'd11, 4'd13, 4'd6, 4'd10, 4'd1, 4'd7, 4'd12,
                                          4'd5, 4'd14, 4'd8, 4'd3, 4'd15, 4'd4, 4'd2, 4'd9};
  localparam logic [3:0] RUN_SEQ [16] = '{4'd15, 4'd7, 4'd3, 4'd1, 4'd8, 4'd4, 4'd2, 4'd9,
                                          4'd12, 4'd6, 4'd11, 4'd5, 4'd10, 4'd13, 4'd14, 4'd15};

  rev_lfsr4 dut (.clk(clk), .din(din), .ctrl(ctrl), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: dout=%0d at %0t", what, dout, $time);
    end
  endtask

  // serial load, bit 0 first; returns on the falling edge after the 4th load
  task automatic load(input logic [3:0] v);
    for (int i = 0; i < 4; i++) begin
      ctrl = 1'b1;
      din  = v[i];
      @(negedge clk);
    end
    ctrl = 1'b0;
    din  = 1'b0;
  endtask

  task automatic run(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = 1'b0;
    din  = 1'b0;
    @(negedge clk);

    // 1. load ones, then free run
    ctrl = 1'b1;
    din  = 1'b1;
    run(4);
    ctrl = 1'b0;
    for (int i = 0; i < 16; i++) begin
      check(dout == RUN_SEQ[i], $sformatf("free-run sequence step %0d", i));
      run(1);
    end

    // 2. worked example: 12 -> 15 in 7 steps, 15 -> 12 in 8 steps
    load(4'd12);
    check(dout == 4'd12, "load 12");
    run(7);
    check(dout == 4'd15, "12 after 7 steps");
    load(4'd15);
    run(8);
    check(dout == 4'd12, "15 after 8 steps");

    // 3. every nibble
    for (int v = 0; v < 16; v++) begin
      load(4'(v));
      check(dout == 4'(v), $sformatf("load %0d", v));
      run(7);
      check(dout == ENC_MAP[v], $sformatf("encrypt %0d", v));
      load(ENC_MAP[v]);
      run(8);
      check(dout == 4'(v), $sformatf("decrypt back to %0d", v));
    end

    // 4. zero stays zero
    load(4'd0);
    for (int i = 0; i < 20; i++) begin
      run(1);
      check(dout == 4'd0, "zero state is stuck");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
