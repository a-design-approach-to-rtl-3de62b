// formatter_top_tb: end-to-end test of the formatter at a reduced block size.
//
// Image blocks of B=4 bands x P=4 pixels x L=3 lines (48 bytes, M=47) arrive
// band-interleaved-by-pixel (BIP).  Run 1 programs a band-interleaved-by-line
// (BIL) table and formats 3 blocks with random gaps in the data clock; run 2
// returns to initialisation, programs a band-sequential (BSQ) table and
// formats 2 blocks at one byte per clk.  For each run the processor side
// writes the table, M and N, reads them back, drops mode, and raises it again
// on the interrupt.  Every output byte is compared with the independently
// reordered input.  Checked as well: the first output byte appears two data
// clocks after the first block is complete, and once running one byte leaves
// per data clock.  Each mechanism (table load, wait state, bank switch,
// data clock gap, interrupt, mode switch) is counted and must occur.
module formatter_top_tb;
  localparam int AW = 6, DW = 8, BW = 8;
  localparam int NB = 4, NP = 4, NL = 3;
  localparam int BLK = NB * NP * NL;     // 48 bytes per block
  localparam int M = BLK - 1;

  logic clk = 0, mode, host_wr, host_rd, din_stb;
  logic [AW:0] host_addr;
  logic [AW-1:0] host_wdata, host_rdata;
  logic [DW-1:0] din, dout;
  logic in_status, out_status, irq, bank_sel, dout_oe, dout_stb;
  logic [BW-1:0] block_num;

  int checks = 0, failures = 0;
  int n_lut_load = 0, n_wait = 0, n_switch = 0, n_gap = 0, n_irq = 0, n_mode = 0;

  // input bytes as sent, output bytes as received
  logic [DW-1:0] sent [$];
  logic [DW-1:0] got  [$];
  int strobes_sent, first_out_strobe;

  formatter_top #(.ADDR_W(AW), .DATA_W(DW), .BLK_W(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BIP buffer address of (line, pixel, band)
  function automatic int bip(int l, int p, int b);
    return l * NP * NB + p * NB + b;
  endfunction

  // buffer address of the k-th output byte for BIL (fmt=0) or BSQ (fmt=1)
  function automatic int src_addr(int fmt, int k);
    int l, p, b;
    if (fmt == 0) begin  // line, band, pixel
      l = k / (NB * NP); b = (k / NP) % NB; p = k % NP;
    end else begin       // band, line, pixel
      b = k / (NL * NP); l = (k / NP) % NL; p = k % NP;
    end
    return bip(l, p, b);
  endfunction

  task automatic host_write(input logic [AW:0] a, input logic [AW-1:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask

  task automatic host_read(input logic [AW:0] a, output logic [AW-1:0] d);
    @(negedge clk); host_addr = a; host_rd = 1;
    @(negedge clk); host_rd = 0; d = host_rdata;
  endtask

  // Output monitor: collect bytes, note the data clock index of the first one.
  // edge_strobes counts data clock pulses taken by the design; when dout_stb
  // is first seen, its old value is the number of the pulse that latched it.
  int edge_strobes;
  always @(posedge clk) begin
    if (mode) edge_strobes <= 0;
    else if (din_stb) edge_strobes <= edge_strobes + 1;
    if (!mode && dout_stb) begin
      if (got.size() == 0) first_out_strobe = edge_strobes;
      got.push_back(dout);
    end
  end

  task automatic run(input int fmt, input int nblk, input bit gaps);
    logic [AW-1:0] rd;
    logic prev_bank;
    int s;
    sent.delete(); got.delete();
    strobes_sent = 0;
    // initialisation mode: load table and registers
    @(negedge clk); mode = 1; din_stb = 0;
    n_mode++;
    for (int k = 0; k < 2**AW; k++)
      host_write({1'b0, AW'(k)}, (k <= M) ? AW'(src_addr(fmt, k)) : '0);
    host_write({1'b1, AW'(0)}, AW'(M));
    host_write({1'b1, AW'(1)}, AW'(nblk));
    for (int k = 0; k <= M; k++) begin
      host_read({1'b0, AW'(k)}, rd);
      chk(rd == AW'(src_addr(fmt, k)), "table read back");
    end
    n_lut_load++;
    host_read({1'b1, AW'(0)}, rd); chk(rd == AW'(M), "M read back");
    host_read({1'b1, AW'(1)}, rd); chk(rd == AW'(nblk), "N read back");
    // processing mode
    @(negedge clk); mode = 0; n_mode++;
    prev_bank = bank_sel;
    s = 0;
    while (!irq) begin
      din_stb = gaps ? (($urandom % 4) != 0) : 1'b1;
      din = DW'($urandom);
      if (din_stb) begin sent.push_back(din); strobes_sent++; end
      else n_gap++;
      @(negedge clk);
      if (strobes_sent > 0 && strobes_sent <= M + 1 && dout_oe == 0) n_wait++;
      if (bank_sel != prev_bank) n_switch++;
      prev_bank = bank_sel;
      s++;
    end
    din_stb = 0;
    n_irq++;
    chk(block_num == BW'(nblk + 1), "block counter at interrupt");
    host_read({1'b1, AW'(2)}, rd); chk(rd[2] == 1'b1, "interrupt visible in status");
    // compare
    chk(got.size() >= nblk * BLK, "enough output bytes");
    for (int blk = 0; blk < nblk; blk++)
      for (int k = 0; k < BLK; k++) begin
        int idx;
        idx = blk * BLK + k;
        if (idx < got.size())
          chk(got[idx] == sent[blk * BLK + src_addr(fmt, k)], "output byte");
      end
    // latency: the first byte is latched by the second data clock after the
    // block is in, i.e. data clock number BLK+2
    chk(first_out_strobe == BLK + 2, "first output latency");
    // rate: one output byte per data clock once started
    chk(got.size() == strobes_sent - (BLK + 1), "one output byte per data clock");
    $display("run fmt=%0d: in=%0d out=%0d first_out=%0d", fmt, strobes_sent, got.size(), first_out_strobe);
  endtask

  initial begin
    mode = 1; host_wr = 0; host_rd = 0; host_addr = 0; host_wdata = 0;
    din_stb = 0; din = 0; first_out_strobe = -1;
    repeat (3) @(negedge clk);
    run(0, 3, 1'b1);   // BIP -> BIL, gaps in the data clock
    run(1, 2, 1'b0);   // BIP -> BSQ, one byte per clk
    @(negedge clk); mode = 1;
    chk(n_lut_load > 0, "table load happened");
    chk(n_wait > 0,     "wait state happened");
    chk(n_switch > 0,   "bank switch happened");
    chk(n_gap > 0,      "data clock gap happened");
    chk(n_irq > 0,      "interrupt happened");
    chk(n_mode > 2,     "mode switch happened");
    $display("events: table_loads=%0d wait=%0d switches=%0d gaps=%0d irqs=%0d mode_changes=%0d",
             n_lut_load, n_wait, n_switch, n_gap, n_irq, n_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
