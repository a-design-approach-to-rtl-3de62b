// prog_io: the programmable input/output circuit through which the processor
// sets up the controllers.
//
// It holds two registers on the processor bus: the address of the final byte
// of a data block (M, fed to magnitude comparators A and C) and the number of
// blocks to format (N, fed to magnitude comparator B).  A third, read-only
// location returns the status lines {irq, out_status, in_status}.  The
// registers are selected when the top bit of the processor address is set
// (lookup-table words occupy the lower half of the address space); the low
// two bits pick the register (fmt_pkg::reg_sel_e).  Writes take effect on the
// rising clk edge and are accepted only in initialisation mode (mode high),
// so the block geometry cannot change while data are being formatted.
// Reads are combinational.  The registers are not reset: the processor
// writes them before every run.  The register map and the write lock are
// this design's own choices.
module prog_io #(
  parameter int unsigned ADDR_W = fmt_pkg::ADDR_W_DEF,
  parameter int unsigned BLK_W  = fmt_pkg::BLK_W_DEF
) (
  input  logic              clk,
  input  logic              mode,        // 1: initialisation, 0: processing
  input  logic [ADDR_W:0]   host_addr,
  input  logic              host_wr,
  input  logic [ADDR_W-1:0] host_wdata,
  output logic [ADDR_W-1:0] host_rdata,  // valid while host_addr selects a register
  input  logic              in_status,
  input  logic              out_status,
  input  logic              irq,
  output logic [ADDR_W-1:0] final_addr,  // M
  output logic [BLK_W-1:0]  num_blocks   // N
);
  import fmt_pkg::*;

  logic     reg_space;
  reg_sel_e sel;

  assign reg_space = host_addr[ADDR_W];
  assign sel       = reg_sel_e'(host_addr[1:0]);

  always_ff @(posedge clk) begin
    if (mode && host_wr && reg_space) begin
      case (sel)
        REG_FINAL_ADDR: final_addr <= host_wdata;
        REG_NUM_BLOCKS: num_blocks <= BLK_W'(host_wdata);
        default: ;
      endcase
    end
  end

  always_comb begin
    host_rdata = '0;
    case (sel)
      REG_FINAL_ADDR: host_rdata = final_addr;
      REG_NUM_BLOCKS: host_rdata = ADDR_W'(num_blocks);
      REG_STATUS:     host_rdata = ADDR_W'({irq, out_status, in_status});
      default:        host_rdata = '0;
    endcase
  end
endmodule
