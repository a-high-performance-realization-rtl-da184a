// Self-checking testbench of rev_lfsr8.
// For all 256 byte values: loads the byte in four serial cycles (bit i of
// each nibble in cycle i), checks it appears on dout, runs 7 steps and
// compares with the cipher byte built from the nibble table below; then
// loads the cipher byte, runs 8 steps and expects the original byte.
module rev_lfsr8_tb;
  logic       clk = 0, ctrl;
  logic [1:0] din;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  localparam logic [3:0] ENC_MAP [16] = '{4'd0, 4'd11, 4'd13, 4'd6, 4'd10, 4'd1, 4'd7, 4'd12,
                                          4'd5, 4'd14, 4'd8, 4'd3, 4'd15, 4'd4, 4'd2, 4'd9};

  rev_lfsr8 dut (.clk(clk), .din(din), .ctrl(ctrl), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: dout=%0d at %0t", what, dout, $time);
    end
  endtask

  task automatic load(input logic [7:0] v);
    for (int i = 0; i < 4; i++) begin
      ctrl = 1'b1;
      din  = {v[4 + i], v[i]};
      @(negedge clk);
    end
    ctrl = 1'b0;
    din  = 2'b00;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] enc;
    ctrl = 1'b0;
    din  = 2'b00;
    @(negedge clk);
    for (int v = 0; v < 256; v++) begin
      enc = {ENC_MAP[v >> 4], ENC_MAP[v & 15]};
      load(8'(v));
      check(dout == 8'(v), $sformatf("load %0d", v));
      repeat (7) @(negedge clk);
      check(dout == enc, $sformatf("encrypt %0d", v));
      load(enc);
      repeat (8) @(negedge clk);
      check(dout == 8'(v), $sformatf("decrypt back to %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
