// Image RAM: DEPTH words of WIDTH bits, one write port and one read port.
//
// A write takes place on the rising edge when wren is 1. The read port is
// registered: rdata shows the word at rdaddr one clock after rdaddr is
// presented, and a read of the address being written returns the old word.
// All words start at zero, as FPGA block memory does after configuration.
// The memory size follows the published design (64 x 8 per image); the
// separate read and write addresses follow its simulation signals.
module image_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     wren,
  input  logic [$clog2(DEPTH)-1:0] wraddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] rdaddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wren) mem[wraddr] <= wdata;
    rdata <= mem[rdaddr];
  end

endmodule
