// output_controller_tb: loads a random lookup table through the processor
// port and reads it back, then drives data clock pulses (with random gaps)
// and an input status shaped like the input controller's (low after the last
// byte of each block).  It checks the wait state before the first block is
// in, then for every data clock pulse j after it: the latched buffer address
// (LUT[j mod (M+1)]), the counter, the output enable, and the output status
// (low exactly on the pulse that finds the counter at 0).
module output_controller_tb;
  localparam int AW = 5;
  localparam int M  = 19;          // 20-byte blocks
  logic clk = 0, mode, din_stb, in_status, host_wr, out_oe, out_status;
  logic [AW-1:0] final_addr, host_wdata, host_rdata, buf_raddr, lut_count;
  logic [AW:0] host_addr;
  logic [AW-1:0] lut [2**AW];
  int checks = 0, failures = 0;
  int k = 0, j = 0, wraps = 0;

  output_controller #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (k=%0d j=%0d) t=%0t", what, k, j, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic stb;
    mode = 1; din_stb = 0; in_status = 0; host_wr = 0; host_addr = 0; host_wdata = 0;
    final_addr = AW'(M);
    for (int i = 0; i < 2**AW; i++) begin
      lut[i] = AW'($urandom);
      @(negedge clk); host_addr = {1'b0, AW'(i)}; host_wdata = lut[i]; host_wr = 1;
    end
    @(negedge clk); host_wr = 0;
    for (int i = 0; i < 2**AW; i++) begin
      host_addr = {1'b0, AW'(i)}; #1 chk(host_rdata == lut[i], "LUT read back");
    end
    // A register-space write must not reach the LUT.
    @(negedge clk); host_addr = {1'b1, AW'(0)}; host_wdata = ~lut[0]; host_wr = 1;
    @(negedge clk); host_wr = 0; host_addr = '0; #1 chk(host_rdata == lut[0], "decoder");
    @(negedge clk); mode = 0;
    // Processing-mode writes are ignored.
    host_addr = {1'b0, AW'(0)}; host_wdata = ~lut[0]; host_wr = 1;
    @(negedge clk); host_wr = 0;
    for (int cyc = 0; cyc < 1200; cyc++) begin
      stb = ($urandom % 3) != 0;
      din_stb = stb;
      @(posedge clk);
      if (stb) begin
        // model of the input status: low after byte M of a block
        in_status <= ((k % (M + 1)) != M);
      end
      @(negedge clk);
      if (stb) begin
        if (k <= M) begin
          chk(out_oe == 0 && lut_count == 0 && out_status == 0, "wait state");
          chk(buf_raddr == lut[0], "LUT location 0 latched while waiting");
        end else begin
          j = k - (M + 1);
          chk(buf_raddr == lut[j % (M + 1)], "buffer address");
          chk(lut_count == AW'((j + 1) % (M + 1)), "counter");
          chk(out_oe == 1, "output enable");
          chk(out_status == ((j % (M + 1)) != 0), "output status");
          if (j % (M + 1) == 0) wraps++;
        end
        k++;
      end
    end
    chk(wraps > 5, "counter wrapped at M");
    mode = 1; @(negedge clk);
    chk(out_oe == 0 && out_status == 0 && lut_count == 0, "mode clears");
    $display("pulses=%0d wraps=%0d", k, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
