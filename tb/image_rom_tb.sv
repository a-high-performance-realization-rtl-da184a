// Self-checking testbench of image_rom.
// Reads every address in order and in random order and checks that rdata
// shows pixel value address + 1 exactly one clock after the address.
module image_rom_tb;
  logic       clk = 0;
  logic [5:0] addr;
  logic [7:0] rdata;
  int checks = 0, failures = 0;

  image_rom dut (.clk(clk), .addr(addr), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: addr=%0d rdata=%0d", what, addr, rdata);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] prev;
    addr = '0;
    @(negedge clk);
    for (int i = 0; i < 64 + 200; i++) begin
      prev = addr;
      addr = (i < 64) ? 6'(i) : 6'($urandom);
      check(rdata == 8'(prev) + 8'd1 || i == 0, "previous address still shown");
      @(negedge clk);
      check(rdata == 8'(addr) + 8'd1, "pixel = address + 1 one cycle later");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
