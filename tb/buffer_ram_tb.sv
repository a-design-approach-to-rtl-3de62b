// buffer_ram_tb: fills a small buffer RAM with random bytes in random order,
// checks every location against a reference array (asynchronous read), and
// checks that a write is visible only after its clock edge.
module buffer_ram_tb;
  localparam int AW = 8, DW = 8;
  logic clk = 0;
  logic [AW-1:0] addr;
  logic we;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  buffer_ram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); addr = AW'(i); wdata = DW'($urandom); we = 1;
      ref_mem[i] = wdata;
    end
    // random overwrites
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); addr = AW'($urandom); wdata = DW'($urandom); we = 1;
      // before the edge the old value must still be read
      #1; checks++;
      if (rdata !== ref_mem[addr]) begin failures++; $display("pre-write mismatch @%0d", addr); end
      ref_mem[addr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2**AW; i++) begin
      addr = AW'(i); #1; checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("mismatch @%0d %h %h", i, rdata, ref_mem[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
