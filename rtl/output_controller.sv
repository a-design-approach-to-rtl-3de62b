// output_controller: produces the read addresses that pull the bytes out of
// the output buffer in the programmed order.
//
// Structure.  A counter, advanced by the data clock, addresses the lookup
// table (LUT) memory; the LUT word is latched and becomes the output buffer
// RAM address.  Magnitude comparator C clears the counter after the final
// address M, so the counter runs 0..M once per block.  In initialisation mode
// (mode high) the LUT address bus switches give the LUT to the processor
// instead: a processor write with the top address bit clear stores a word
// (the decoder), and the LUT word is returned on `host_rdata` (the bus
// transceiver).  Processor writes are ignored in processing mode.
//
// Wait state.  After initialisation, flip-flop 4 holds the counter at 0 and
// flip-flop 5 keeps the system output latch and output data clock disabled.
// While waiting, every data clock re-latches LUT location 0 so the first
// buffer address is ready.  The falling edge of the input status (the first
// block is in) releases flip-flop 4.  From the next data clock on, each pulse
// latches LUT[count] to the buffer address and advances the counter; the
// first such pulse also releases flip-flop 5 (out_oe).  The system output
// latch, one data clock later, therefore captures the byte at LUT[k] one
// pulse after LUT[k] was latched: counter -> LUT -> buffer is a two-stage
// pipeline running continuously across block boundaries.
//
// Output status.  Comparator D (count /= 0) feeds flip-flop 6, clocked by
// the data clock: the status goes low for one data clock when the counter has
// wrapped to 0, marking the last byte of a block on its way out, and its
// rising edges are counted by the input controller.
//
// Timing is per data clock pulse (din_stb, one clk wide); all state changes
// on the rising clk edge.  The original flip-flop 5 fired on the falling
// clock edge with the counter LSB set; here it is released on the rising edge
// of the first counting pulse, which gives the same first output byte.
module output_controller #(
  parameter int unsigned ADDR_W = fmt_pkg::ADDR_W_DEF
) (
  input  logic              clk,
  input  logic              mode,         // 1: initialisation, 0: processing
  input  logic              din_stb,      // input data clock pulse
  input  logic              in_status,    // from the input controller
  input  logic [ADDR_W-1:0] final_addr,   // M
  // processor bus
  input  logic [ADDR_W:0]   host_addr,
  input  logic              host_wr,
  input  logic [ADDR_W-1:0] host_wdata,
  output logic [ADDR_W-1:0] host_rdata,   // LUT word at host_addr (mode high)
  // towards the output-side bus switch and system output
  output logic [ADDR_W-1:0] buf_raddr,    // latched LUT output
  output logic              out_oe,       // flip-flop 5: output latch enable / tri-state control
  output logic              out_status,   // flip-flop 6
  output logic [ADDR_W-1:0] lut_count     // LUT input address counter
);
  logic              hold;                // flip-flop 4
  logic              in_status_q;
  logic              in_fall;
  logic              run;
  logic              cmp_c_gt, cmp_c_eq;
  logic              cmp_d_gt_unused, cmp_d_eq;
  logic [ADDR_W-1:0] lut_addr;
  logic              lut_we;
  logic [ADDR_W-1:0] lut_rdata;

  // LUT address bus switches and decoder.
  always_comb begin
    if (mode) begin
      lut_addr = host_addr[ADDR_W-1:0];
      lut_we   = host_wr && !host_addr[ADDR_W];
    end else begin
      lut_addr = lut_count;
      lut_we   = 1'b0;
    end
  end

  lut_memory #(.ADDR_W(ADDR_W), .WORD_W(ADDR_W)) u_lut (
    .clk(clk), .addr(lut_addr), .we(lut_we), .wdata(host_wdata), .rdata(lut_rdata)
  );

  // Bus transceiver: LUT data lines onto the processor data bus.
  assign host_rdata = mode ? lut_rdata : '0;

  // Comparator C: counter against M.  Comparator D: counter against zero.
  mag_compare #(.W(ADDR_W)) u_cmp_c (
    .a(lut_count), .b(final_addr), .a_gt_b(cmp_c_gt), .a_eq_b(cmp_c_eq)
  );
  mag_compare #(.W(ADDR_W)) u_cmp_d (
    .a(lut_count), .b('0), .a_gt_b(cmp_d_gt_unused), .a_eq_b(cmp_d_eq)
  );

  // Falling edge of the input status releases the wait state.
  assign in_fall = in_status_q && !in_status;
  assign run     = !hold || in_fall;

  always_ff @(posedge clk) begin
    in_status_q <= in_status;
    if (mode) begin
      hold       <= 1'b1;
      lut_count  <= '0;
      out_oe     <= 1'b0;
      out_status <= 1'b0;
      buf_raddr  <= '0;
    end else begin
      if (in_fall) hold <= 1'b0;
      if (din_stb) begin
        buf_raddr  <= lut_rdata;       // LUT output latch
        out_status <= !cmp_d_eq;       // flip-flop 6
        if (run) begin
          out_oe <= 1'b1;              // flip-flop 5
          if (cmp_c_eq || cmp_c_gt) lut_count <= '0;
          else                      lut_count <= lut_count + 1'b1;
        end
      end
    end
  end
endmodule
