// buffer_ram: one of the two alternating data buffers (RAM A or RAM B).
//
// A static RAM with a single address bus, as in the original system: the
// bus switches in front of it present either the input controller's write
// address or the output controller's read address.  Reads are asynchronous
// (rdata follows addr combinationally, like a static RAM's access path);
// a write takes place on the rising clk edge while we is high.
// Depth 2**ADDR_W words of DATA_W bits; the default 64K x 8 holds one
// 65 536-byte block.  The chip-select decoding of the original memory boards
// is not needed for a single array and is not modelled.
module buffer_ram #(
  parameter int unsigned ADDR_W = fmt_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W = fmt_pkg::DATA_W_DEF
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
