// input_controller: writes the incoming byte stream into whichever buffer RAM
// is currently the input buffer, and decides when the two RAMs swap roles.
//
// Operation.  While `mode` is high (initialisation) every flip-flop and
// counter is cleared.  With `mode` low, each data clock pulse (`din_stb`, one
// clk cycle wide) captures one byte.  The address counter starts at 0 and
// counts up to the final address M programmed by the processor; magnitude
// comparator A clears it after M (A > B) and its A = B output clears the
// input status after the last byte of the block ("buffer full").  The next
// data clock sets the status again; that low-to-high transition toggles the
// T flip-flop whose outputs are the bus-switch control word (bank_sel = 1:
// RAM A is the input buffer, RAM B the output buffer; S1,S3,C2 follow
// bank_sel, S2,S4,C1 its complement).  The first data clock after
// initialisation therefore selects RAM A and writes address 0.
// The block counter counts rising edges of the output controller's output
// status; magnitude comparator B raises `irq` once that count exceeds the
// programmed number of blocks N, telling the processor the run is complete.
//
// Timing.  A byte captured on a data clock pulse is written one clk later
// (wr_we is a one-clk write command with wr_addr/wr_data held), so that a
// block's last byte still reaches the old input buffer while the byte that
// starts the next block, captured on the switching pulse, reaches the new
// one.  This stands in for the original write one-shot, which wrote at the end
// of a pulse t_w after the data clock edge.  A pulse on every clk cycle is
// allowed.  The one-shot that narrows the A = B pulse, and the flip-flop that
// holds the counter clear until the first falling clock edge, have no
// counterpart in this single-edge synchronous design: the counter is simply
// 0 after initialisation.  M >= 1 is required (blocks of at least 2 bytes).
module input_controller #(
  parameter int unsigned ADDR_W = fmt_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W = fmt_pkg::DATA_W_DEF,
  parameter int unsigned BLK_W  = fmt_pkg::BLK_W_DEF
) (
  input  logic              clk,
  input  logic              mode,        // 1: initialisation, 0: processing
  input  logic              din_stb,     // input data clock pulse
  input  logic [DATA_W-1:0] din,
  input  logic [ADDR_W-1:0] final_addr,  // M, address of the last byte of a block
  input  logic [BLK_W-1:0]  num_blocks,  // N
  input  logic              out_status,  // from the output controller
  // write port towards the input-side bus switch
  output logic [ADDR_W-1:0] wr_addr,
  output logic              wr_we,
  output logic [DATA_W-1:0] wr_data,
  // status and control
  output logic              in_status,
  output logic              bank_sel,    // T flip-flop: 1 = RAM A is input buffer
  output logic [BLK_W-1:0]  block_num,   // block counter, for the system I/O
  output logic              irq          // comparator B: block_num > N
);
  logic [ADDR_W-1:0] addr_cnt;
  logic              cmp_a_gt, cmp_a_eq;
  logic              cmp_b_gt, cmp_b_eq_unused;
  logic              out_status_q;

  // Comparator A: address counter against M.
  mag_compare #(.W(ADDR_W)) u_cmp_a (
    .a(addr_cnt), .b(final_addr), .a_gt_b(cmp_a_gt), .a_eq_b(cmp_a_eq)
  );

  // Comparator B: blocks seen against N.
  mag_compare #(.W(BLK_W)) u_cmp_b (
    .a(block_num), .b(num_blocks), .a_gt_b(cmp_b_gt), .a_eq_b(cmp_b_eq_unused)
  );

  always_ff @(posedge clk) begin
    if (mode) begin
      addr_cnt  <= '0;
      in_status <= 1'b0;
      bank_sel  <= 1'b0;
      wr_we     <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
    end else begin
      wr_we <= 1'b0;
      if (din_stb) begin
        // Write command for this byte, issued on the next clk.
        wr_we   <= 1'b1;
        wr_addr <= addr_cnt;
        wr_data <= din;
        // Status flip-flop: set by the data clock, cleared after the last
        // byte; its rising edge toggles the bus-switch flip-flop.
        if (!in_status) begin
          in_status <= 1'b1;
          bank_sel  <= ~bank_sel;
        end
        if (cmp_a_eq || cmp_a_gt) begin
          in_status <= 1'b0;       // buffer full
          addr_cnt  <= '0;
        end else begin
          addr_cnt  <= addr_cnt + 1'b1;
        end
      end
    end
  end

  // Block counter, clocked by the output status.
  always_ff @(posedge clk) begin
    out_status_q <= out_status;
    if (mode)
      block_num <= '0;
    else if (out_status && !out_status_q)
      block_num <= block_num + 1'b1;
  end

  assign irq = cmp_b_gt;
endmodule
