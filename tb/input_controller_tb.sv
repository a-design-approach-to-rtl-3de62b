// input_controller_tb: streams bytes with random gaps through the input
// controller (12-byte blocks) and checks, for every data clock pulse, the
// write command one clk later (address = byte index modulo the block size,
// data = the byte), the input status (low only after a block's last byte),
// and the bus-switch control word (RAM A for the first block, then
// alternating).  It also pulses the output status and checks the block
// counter and the interrupt (count > programmed number of blocks).
module input_controller_tb;
  localparam int AW = 6, DW = 8, BW = 8;
  localparam int M = 11;           // final address: 12-byte blocks
  localparam int NBLK = 5;
  logic clk = 0, mode, din_stb, out_status;
  logic [DW-1:0] din;
  logic [AW-1:0] final_addr, wr_addr;
  logic [BW-1:0] num_blocks, block_num;
  logic wr_we, in_status, bank_sel, irq;
  logic [DW-1:0] wr_data;
  int checks = 0, failures = 0;
  int k = 0, rises = 0, switches = 0, gaps = 0;
  logic cap;
  logic [DW-1:0] cap_data;

  input_controller #(.ADDR_W(AW), .DATA_W(DW), .BLK_W(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (byte %0d) t=%0t", what, k, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_bank;
    mode = 1; din_stb = 0; din = 0; out_status = 0;
    final_addr = AW'(M); num_blocks = BW'(NBLK);
    repeat (3) @(negedge clk);
    chk(in_status == 0 && bank_sel == 0 && wr_we == 0 && block_num == 0, "initialised");
    mode = 0;
    prev_bank = 0;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      din_stb = ($urandom % 4) != 0;
      if (!din_stb) gaps++;
      din = DW'($urandom);
      cap = din_stb; cap_data = din;
      @(negedge clk);
      if (cap) begin
        chk(wr_we == 1, "write command");
        chk(wr_addr == AW'(k % (M + 1)), "write address");
        chk(wr_data == cap_data, "write data");
        chk(bank_sel == (((k / (M + 1)) % 2) == 0), "bank select");
        chk(in_status == ((k % (M + 1)) != M), "input status");
        if (bank_sel != prev_bank) switches++;
        prev_bank = bank_sel;
        k++;
      end else begin
        chk(wr_we == 0, "no write without data clock");
      end
    end
    chk(switches == (k + M) / (M + 1), "number of bank switches");
    // Block counter and interrupt.
    din_stb = 0;
    for (int i = 0; i < 3 * NBLK; i++) begin
      repeat ($urandom % 3 + 1) @(negedge clk);
      out_status = 1; rises++;
      @(negedge clk);
      chk(block_num == BW'(rises), "block count");
      chk(irq == (rises > NBLK), "interrupt");
      repeat ($urandom % 3 + 1) @(negedge clk);
      out_status = 0;
    end
    mode = 1;
    @(negedge clk);
    chk(block_num == 0 && irq == 0 && in_status == 0, "mode clears");
    $display("bytes=%0d switches=%0d gaps=%0d", k, switches, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
