// Input image ROM: DEPTH words of WIDTH bits with a registered read port.
//
// rdata shows the word at addr one clock after addr is presented, as a
// synchronous FPGA block memory does. The contents are the published test
// image: word i holds i + 1 (pixels 1..64). Passing a file name in INIT_FILE
// loads another image with $readmemh instead.
module image_rom #(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned WIDTH     = 8,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int i = 0; i < DEPTH; i++) mem[i] = WIDTH'(i + 1);
    end
  end

  always_ff @(posedge clk) rdata <= mem[addr];

endmodule
