// lut_memory_tb: writes a random permutation-like table into a small LUT and
// reads it back location by location against a reference array.
module lut_memory_tb;
  localparam int AW = 8, WW = 16;
  logic clk = 0;
  logic [AW-1:0] addr;
  logic we;
  logic [WW-1:0] wdata, rdata;
  logic [WW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  lut_memory #(.ADDR_W(AW), .WORD_W(WW)) dut (.*);

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
      @(negedge clk); addr = AW'(i); wdata = WW'($urandom); we = 1;
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 2**AW - 1; i >= 0; i--) begin
      addr = AW'(i); #1; checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("mismatch @%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
