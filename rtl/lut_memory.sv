// lut_memory: the address lookup table of the output controller.
//
// Location k holds the buffer address of the k-th byte to be sent out, so the
// order of the table sets the output format.  A static RAM with one address
// bus: asynchronous read, write on the rising clk edge while we is high.
// Default 64K x 16: one 16-bit buffer address per byte of a 65 536-byte block.
module lut_memory #(
  parameter int unsigned ADDR_W = fmt_pkg::ADDR_W_DEF,  // LUT address bits
  parameter int unsigned WORD_W = fmt_pkg::ADDR_W_DEF   // buffer address bits
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata
);
  logic [WORD_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
