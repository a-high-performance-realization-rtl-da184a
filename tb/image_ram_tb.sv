// Self-checking testbench of image_ram.
// Checks that every word reads zero before any write, writes random data to
// all 64 words, reads them back (one cycle latency), checks that wren = 0
// leaves a word unchanged and that a read of the word being written returns
// the old contents. A scoreboard array holds the expected contents.
module image_ram_tb;
  logic       clk = 0, wren;
  logic [5:0] wraddr, rdaddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [64];
  int checks = 0, failures = 0;

  image_ram dut (.clk(clk), .wren(wren), .wraddr(wraddr), .wdata(wdata),
                 .rdaddr(rdaddr), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: rdaddr=%0d rdata=%0d", what, rdaddr, rdata);
    end
  endtask

  task automatic read_check(input logic [5:0] a);
    rdaddr = a;
    @(negedge clk);
    check(rdata == model[a], $sformatf("read word %0d", a));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wren = 1'b0; wraddr = '0; wdata = '0; rdaddr = '0;
    for (int i = 0; i < 64; i++) model[i] = '0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) read_check(6'(i));

    // fill with random data
    for (int i = 0; i < 64; i++) begin
      wren = 1'b1; wraddr = 6'(i); wdata = 8'($urandom);
      model[i] = wdata;
      @(negedge clk);
    end
    wren = 1'b0;
    for (int i = 0; i < 64; i++) read_check(6'(63 - i));

    // disabled write
    wraddr = 6'd5; wdata = ~model[5]; wren = 1'b0;
    @(negedge clk);
    read_check(6'd5);

    // random mix, including read of the word being written
    for (int i = 0; i < 300; i++) begin
      logic [7:0] old;
      wren   = 1'($urandom);
      wraddr = 6'($urandom);
      wdata  = 8'($urandom);
      rdaddr = (i % 3 == 0) ? wraddr : 6'($urandom);
      old    = model[rdaddr];
      if (wren) model[wraddr] = wdata;
      @(negedge clk);
      check(rdata == old, "read during write returns old word");
    end
    wren = 1'b0;
    for (int i = 0; i < 64; i++) read_check(6'(i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
