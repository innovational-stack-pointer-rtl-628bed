// stack_mem: memory module of the stack.
//
// DEPTH words of DATA_W bits with one address port shared by reads and
// writes. The read is asynchronous: rdata always shows the word at addr.
// A write stores wdata at addr on the rising clk edge when we = 1. The
// asynchronous-read memory follows the document's example; the widths are
// parameters, DEPTH defaulting to the 2^4 = 16 addresses of the 4-stage
// address generator. The array is not reset.
module stack_mem #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
