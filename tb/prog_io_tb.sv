// prog_io_tb: programs the final-address and block-count registers, checks
// read-back and the status word, that lookup-table addresses do not touch
// the registers, and that writes are ignored in processing mode.
module prog_io_tb;
  localparam int AW = 16, BW = 16;
  logic clk = 0, mode, host_wr, in_status, out_status, irq;
  logic [AW:0] host_addr;
  logic [AW-1:0] host_wdata, host_rdata, final_addr;
  logic [BW-1:0] num_blocks;
  int checks = 0, failures = 0;

  prog_io #(.ADDR_W(AW), .BLK_W(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [AW:0] a, input logic [AW-1:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] m, n;
    mode = 1; host_wr = 0; host_addr = 0; host_wdata = 0;
    in_status = 0; out_status = 0; irq = 0;
    for (int i = 0; i < 20; i++) begin
      m = AW'($urandom); n = AW'($urandom);
      wr({1'b1, 16'd0}, m);
      wr({1'b1, 16'd1}, n);
      wr({1'b0, 16'd0}, ~m);   // a LUT address: must not change registers
      wr({1'b0, 16'd1}, ~n);
      chk(final_addr == m, "final_addr");
      chk(num_blocks == n, "num_blocks");
      host_addr = {1'b1, 16'd0}; #1 chk(host_rdata == m, "read M");
      host_addr = {1'b1, 16'd1}; #1 chk(host_rdata == n, "read N");
    end
    host_addr = {1'b1, 16'd2};
    for (int s = 0; s < 8; s++) begin
      {irq, out_status, in_status} = 3'(s);
      #1 chk(host_rdata == AW'(s), "status");
    end
    mode = 0;
    wr({1'b1, 16'd0}, ~m);
    chk(final_addr == m, "write ignored while processing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
