// formatter_chain_tb: two formatters in series, as at the interface between
// two processing stages.  The first reorders band-interleaved-by-pixel (BIP)
// blocks to band-interleaved-by-line (BIL), as wanted for line-by-line
// radiometric correction; the second returns BIL to BIP, as wanted for
// per-pixel classification.  The second formatter is clocked by the first
// one's output data clock.  Blocks are 4 bands x 8 pixels x 4 lines
// (128 bytes).  The round trip must reproduce the sensor stream exactly,
// and the intermediate stream must be the BIL reordering of it.
module formatter_chain_tb;
  localparam int AW = 7, DW = 8, BW = 8;
  localparam int NB = 4, NP = 8, NL = 4;
  localparam int BLK = NB * NP * NL;     // 128 bytes
  localparam int M = BLK - 1;
  localparam int NBLK = 3;

  logic clk = 0, mode;
  logic [AW:0] host_addr;
  logic host_wr1, host_wr2, host_rd;
  logic [AW-1:0] host_wdata, rdata1, rdata2;
  logic din_stb;
  logic [DW-1:0] din, mid, dout;
  logic mid_oe, mid_stb, dout_oe, dout_stb;
  logic in1, out1, irq1, sel1, in2, out2, irq2, sel2;
  logic [BW-1:0] blk1, blk2;
  int checks = 0, failures = 0;
  logic [DW-1:0] sent [$];
  logic [DW-1:0] midq [$];
  logic [DW-1:0] got  [$];

  formatter_top #(.ADDR_W(AW), .DATA_W(DW), .BLK_W(BW)) u_f1 (
    .clk(clk), .mode(mode), .in_status(in1), .out_status(out1), .block_num(blk1),
    .irq(irq1), .bank_sel(sel1), .host_addr(host_addr), .host_wr(host_wr1), .host_rd(host_rd),
    .host_wdata(host_wdata), .host_rdata(rdata1), .din_stb(din_stb), .din(din),
    .dout(mid), .dout_oe(mid_oe), .dout_stb(mid_stb));

  formatter_top #(.ADDR_W(AW), .DATA_W(DW), .BLK_W(BW)) u_f2 (
    .clk(clk), .mode(mode), .in_status(in2), .out_status(out2), .block_num(blk2),
    .irq(irq2), .bank_sel(sel2), .host_addr(host_addr), .host_wr(host_wr2), .host_rd(host_rd),
    .host_wdata(host_wdata), .host_rdata(rdata2), .din_stb(mid_stb), .din(mid),
    .dout(dout), .dout_oe(dout_oe), .dout_stb(dout_stb));

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bip(int l, int p, int b);
    return l * NP * NB + p * NB + b;
  endfunction
  function automatic int bil(int l, int p, int b);
    return l * NB * NP + b * NP + p;
  endfunction
  // k-th BIL output byte taken from a BIP buffer
  function automatic int to_bil(int k);
    return bip(k / (NB * NP), k % NP, (k / NP) % NB);
  endfunction
  // k-th BIP output byte taken from a BIL buffer
  function automatic int to_bip(int k);
    return bil(k / (NP * NB), (k / NB) % NP, k % NB);
  endfunction

  always @(posedge clk) begin
    if (!mode && mid_stb) midq.push_back(mid);
    if (!mode && dout_stb) got.push_back(dout);
  end

  task automatic wr(input int which, input logic [AW:0] a, input logic [AW-1:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr1 = (which == 1); host_wr2 = (which == 2);
    @(negedge clk); host_wr1 = 0; host_wr2 = 0;
  endtask

  initial begin
    mode = 1; host_addr = 0; host_wr1 = 0; host_wr2 = 0; host_rd = 0; host_wdata = 0;
    din_stb = 0; din = 0;
    repeat (3) @(negedge clk);
    for (int k = 0; k <= M; k++) begin
      wr(1, {1'b0, AW'(k)}, AW'(to_bil(k)));
      wr(2, {1'b0, AW'(k)}, AW'(to_bip(k)));
    end
    wr(1, {1'b1, AW'(0)}, AW'(M)); wr(1, {1'b1, AW'(1)}, AW'(NBLK));
    wr(2, {1'b1, AW'(0)}, AW'(M)); wr(2, {1'b1, AW'(1)}, AW'(NBLK));
    @(negedge clk); mode = 0;
    // The sensor keeps sending until the second stage has finished.
    while (!irq2) begin
      din_stb = ($urandom % 5) != 0; din = DW'($urandom);
      if (din_stb) sent.push_back(din);
      @(negedge clk);
    end
    din_stb = 0;
    chk(irq1, "first stage finished before the second");
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < BLK; k++)
        chk(midq[b * BLK + k] == sent[b * BLK + to_bil(k)], "BIL stream");
    for (int i = 0; i < NBLK * BLK; i++)
      chk(got[i] == sent[i], "round trip");
    $display("sent=%0d mid=%0d out=%0d", sent.size(), midq.size(), got.size());
    @(negedge clk); mode = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
