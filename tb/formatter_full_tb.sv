// formatter_full_tb: one complete operation of the formatter at its default
// size: 65 536-byte blocks of 8-bit data, 64K x 16 lookup table.
//
// Each block is an image of 4 bands x 128 pixels x 128 lines arriving
// band-interleaved-by-pixel; the table reorders it to band-sequential.  The
// processor side loads all 65 536 table words, sets M = 65535 and N = 2,
// and the sensor then sends one byte per clk until the interrupt.  Both
// output blocks are compared byte for byte with the reordered input, and the
// first-output latency (data clock 65 538) and the one-byte-per-clock output
// rate are checked.
module formatter_full_tb;
  localparam int AW = fmt_pkg::ADDR_W_DEF, DW = fmt_pkg::DATA_W_DEF;
  localparam int NB = 4, NP = 128, NL = 128;
  localparam int BLK = NB * NP * NL;   // 65 536
  localparam int NBLK = 2;

  logic clk = 0, mode, host_wr, host_rd, din_stb;
  logic [AW:0] host_addr;
  logic [AW-1:0] host_wdata, host_rdata;
  logic [DW-1:0] din, dout;
  logic in_status, out_status, irq, bank_sel, dout_oe, dout_stb;
  logic [fmt_pkg::BLK_W_DEF-1:0] block_num;

  int checks = 0, failures = 0, switches = 0;
  logic [DW-1:0] sent [$];
  logic [DW-1:0] got  [$];
  int edge_strobes, first_out_strobe = -1;

  formatter_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // buffer (BIP) address of the k-th byte in band-sequential order
  function automatic int src_addr(int k);
    int l, p, b;
    b = k / (NL * NP); l = (k / NP) % NL; p = k % NP;
    return l * NP * NB + p * NB + b;
  endfunction

  always @(posedge clk) begin
    if (mode) edge_strobes <= 0;
    else if (din_stb) edge_strobes <= edge_strobes + 1;
    if (!mode && dout_stb) begin
      if (got.size() == 0) first_out_strobe = edge_strobes;
      got.push_back(dout);
    end
  end

  task automatic host_write(input logic [AW:0] a, input logic [AW-1:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask

  initial begin
    logic prev_bank;
    mode = 1; host_wr = 0; host_rd = 0; host_addr = 0; host_wdata = 0;
    din_stb = 0; din = 0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < BLK; k++) host_write({1'b0, AW'(k)}, AW'(src_addr(k)));
    host_write({1'b1, AW'(0)}, AW'(BLK - 1));
    host_write({1'b1, AW'(1)}, AW'(NBLK));
    // spot-check the table through the processor read path
    for (int k = 0; k < BLK; k += 4099) begin
      @(negedge clk); host_addr = {1'b0, AW'(k)}; host_rd = 1;
      @(negedge clk); host_rd = 0;
      chk(host_rdata == AW'(src_addr(k)), "table read back");
    end
    @(negedge clk); mode = 0;
    prev_bank = bank_sel;
    while (!irq) begin
      din_stb = 1; din = DW'($urandom);
      sent.push_back(din);
      @(negedge clk);
      if (bank_sel != prev_bank) switches++;
      prev_bank = bank_sel;
    end
    din_stb = 0;
    @(negedge clk);   // let the last output data clock be seen
    // the interrupt comes as the input of block NBLK+2 begins
    chk(switches == NBLK + 2, "bank switches");
    chk(got.size() >= NBLK * BLK, "enough output");
    for (int blk = 0; blk < NBLK; blk++)
      for (int k = 0; k < BLK; k++)
        chk(got[blk * BLK + k] == sent[blk * BLK + src_addr(k)], "output byte");
    chk(first_out_strobe == BLK + 2, "first output latency");
    chk(got.size() == sent.size() - (BLK + 1), "one output byte per data clock");
    $display("in=%0d out=%0d first_out=%0d switches=%0d", sent.size(), got.size(), first_out_strobe, switches);
    @(negedge clk); mode = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
