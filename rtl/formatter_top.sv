// formatter_top: real-time formatter for multispectral image data using an
// alternating (ping-pong) pair of buffer memories.
//
// A continuous stream of sensor bytes arrives one per data clock pulse.  The
// input controller writes a block of M+1 bytes into one buffer RAM in arrival
// order while the output controller reads the previous block out of the
// other RAM in the order given by a lookup table (LUT) of buffer addresses.
// When a block is complete the bus switches swap the RAMs' roles, so the
// stream never stops.  The LUT contents therefore define the format change,
// e.g. band-interleaved-by-pixel in, band-sequential out.
//
// A processor (outside this module) sets the system up while `mode` is high:
// it writes the LUT (processor address top bit clear) and the final address
// M and block count N (top bit set, see fmt_pkg::reg_sel_e), then drops
// `mode`.  Output starts one block after input; `irq` rises once N blocks
// have been sent out, after which the processor raises `mode` again.
// `host_rdata` returns, one clk after `host_rd`, the LUT word (only while
// `mode` is high) or the register addressed.
//
// Interface: one clock `clk`; `din_stb` marks a data clock pulse (at most one
// byte per clk); `dout_stb` marks each new output byte on `dout`, valid while
// `dout_oe` is high.  The output lags the input by one block plus two data
// clocks.  `bank_sel` is the bus-switch control word (1: RAM A takes input).
module formatter_top #(
  parameter int unsigned ADDR_W = fmt_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W = fmt_pkg::DATA_W_DEF,
  parameter int unsigned BLK_W  = fmt_pkg::BLK_W_DEF
) (
  input  logic              clk,
  // system I/O
  input  logic              mode,        // 1: initialisation, 0: processing
  output logic              in_status,
  output logic              out_status,
  output logic [BLK_W-1:0]  block_num,
  output logic              irq,
  output logic              bank_sel,
  // processor bus
  input  logic [ADDR_W:0]   host_addr,
  input  logic              host_wr,
  input  logic              host_rd,
  input  logic [ADDR_W-1:0] host_wdata,
  output logic [ADDR_W-1:0] host_rdata,
  // sensor data in
  input  logic              din_stb,
  input  logic [DATA_W-1:0] din,
  // formatted data out
  output logic [DATA_W-1:0] dout,
  output logic              dout_oe,
  output logic              dout_stb
);
  logic [ADDR_W-1:0] final_addr;
  logic [BLK_W-1:0]  num_blocks;
  logic [ADDR_W-1:0] reg_rdata, lut_host_rdata;

  logic [ADDR_W-1:0] wr_addr;
  logic              wr_we;
  logic [DATA_W-1:0] wr_data;
  logic [ADDR_W-1:0] buf_raddr;
  logic              out_oe;
  logic [ADDR_W-1:0] lut_count_unused;

  logic [ADDR_W-1:0] a_addr, b_addr;
  logic              a_we, b_we;
  logic [DATA_W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [DATA_W-1:0] a_bus, b_bus, out_bus;
  logic              a_drive, b_drive;

  prog_io #(.ADDR_W(ADDR_W), .BLK_W(BLK_W)) u_prog_io (
    .clk(clk), .mode(mode),
    .host_addr(host_addr), .host_wr(host_wr), .host_wdata(host_wdata),
    .host_rdata(reg_rdata),
    .in_status(in_status), .out_status(out_status), .irq(irq),
    .final_addr(final_addr), .num_blocks(num_blocks)
  );

  input_controller #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .BLK_W(BLK_W)) u_in_ctrl (
    .clk(clk), .mode(mode), .din_stb(din_stb), .din(din),
    .final_addr(final_addr), .num_blocks(num_blocks), .out_status(out_status),
    .wr_addr(wr_addr), .wr_we(wr_we), .wr_data(wr_data),
    .in_status(in_status), .bank_sel(bank_sel), .block_num(block_num), .irq(irq)
  );

  output_controller #(.ADDR_W(ADDR_W)) u_out_ctrl (
    .clk(clk), .mode(mode), .din_stb(din_stb), .in_status(in_status),
    .final_addr(final_addr),
    .host_addr(host_addr), .host_wr(host_wr), .host_wdata(host_wdata),
    .host_rdata(lut_host_rdata),
    .buf_raddr(buf_raddr), .out_oe(out_oe), .out_status(out_status),
    .lut_count(lut_count_unused)
  );

  // RAM A: input buffer while bank_sel is 1.
  bus_switch #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_sw_a (
    .enable(!mode), .to_input(bank_sel),
    .in_addr(wr_addr), .in_we(wr_we), .in_data(wr_data),
    .out_addr(buf_raddr), .out_data(a_bus), .out_drive(a_drive),
    .ram_addr(a_addr), .ram_we(a_we), .ram_wdata(a_wdata), .ram_rdata(a_rdata)
  );
  buffer_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram_a (
    .clk(clk), .addr(a_addr), .we(a_we), .wdata(a_wdata), .rdata(a_rdata)
  );

  // RAM B: input buffer while bank_sel is 0.
  bus_switch #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_sw_b (
    .enable(!mode), .to_input(!bank_sel),
    .in_addr(wr_addr), .in_we(wr_we), .in_data(wr_data),
    .out_addr(buf_raddr), .out_data(b_bus), .out_drive(b_drive),
    .ram_addr(b_addr), .ram_we(b_we), .ram_wdata(b_wdata), .ram_rdata(b_rdata)
  );
  buffer_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram_b (
    .clk(clk), .addr(b_addr), .we(b_we), .wdata(b_wdata), .rdata(b_rdata)
  );

  // Shared output bus: exactly one switch drives it in processing mode.
  assign out_bus = a_bus | b_bus;

  // The two switches must never drive the output bus together.
  assert property (@(posedge clk) !(a_drive && b_drive));

  output_latch #(.DATA_W(DATA_W)) u_out_latch (
    .clk(clk), .mode(mode), .din_stb(din_stb), .oe(out_oe), .bus_data(out_bus),
    .dout(dout), .dout_oe(dout_oe), .dout_stb(dout_stb)
  );

  // Processor read port: registered read data.
  always_ff @(posedge clk) begin
    if (host_rd) host_rdata <= host_addr[ADDR_W] ? reg_rdata : lut_host_rdata;
  end
endmodule
