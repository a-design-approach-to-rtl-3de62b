// bus_switch: the data bus switch (DBS) and address bus switch (ABS) pair in
// front of one buffer RAM.
//
// Port 1 is the input side (input controller address, write command, input
// data bus), port 2 the output side (output controller address, output data
// bus), port 3 the RAM.  With `enable` low (initialisation mode) the RAM is
// detached from both sides: address 0, no write, nothing driven on the output
// bus.  With `enable` high, `to_input` picks port 1 (1->3 for data, address
// and write) or port 2 (3->2 for data, address to the RAM).  The output-bus
// data is zero when this RAM does not drive the bus, so the two RAMs' bus
// outputs can be ORed together in place of the original shared tri-state bus.
// Combinational; the select lines come from the input controller's toggle
// flip-flop (S1..S4, C1, C2).
module bus_switch #(
  parameter int unsigned ADDR_W = fmt_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W = fmt_pkg::DATA_W_DEF
) (
  input  logic              enable,     // low in initialisation mode
  input  logic              to_input,   // 1: RAM on input side, 0: output side
  // port 1: input side
  input  logic [ADDR_W-1:0] in_addr,
  input  logic              in_we,
  input  logic [DATA_W-1:0] in_data,
  // port 2: output side
  input  logic [ADDR_W-1:0] out_addr,
  output logic [DATA_W-1:0] out_data,
  output logic              out_drive,
  // port 3: RAM
  output logic [ADDR_W-1:0] ram_addr,
  output logic              ram_we,
  output logic [DATA_W-1:0] ram_wdata,
  input  logic [DATA_W-1:0] ram_rdata
);
  always_comb begin
    ram_addr  = '0;
    ram_we    = 1'b0;
    ram_wdata = '0;
    out_data  = '0;
    out_drive = 1'b0;
    if (enable) begin
      if (to_input) begin
        ram_addr  = in_addr;
        ram_we    = in_we;
        ram_wdata = in_data;
      end else begin
        ram_addr  = out_addr;
        out_data  = ram_rdata;
        out_drive = 1'b1;
      end
    end
  end
endmodule
