// output_latch_tb: random data clock pulses and output enable; checks that the
// latch only captures the bus while enabled, that the output data clock pulses
// exactly then, and that mode clears it.
module output_latch_tb;
  localparam int DW = 8;
  logic clk = 0, mode, din_stb, oe, dout_oe, dout_stb;
  logic [DW-1:0] bus_data, dout;
  logic [DW-1:0] exp_dout;
  logic exp_stb;
  int checks = 0, failures = 0;

  output_latch #(.DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 1; din_stb = 0; oe = 0; bus_data = 0;
    repeat (2) @(posedge clk);
    exp_dout = 0; exp_stb = 0;
    @(negedge clk); mode = 0;
    for (int i = 0; i < 1000; i++) begin
      din_stb = 1'($urandom); oe = ($urandom % 4) != 0; bus_data = DW'($urandom);
      @(posedge clk);
      exp_stb = din_stb && oe;
      if (din_stb && oe) exp_dout = bus_data;
      @(negedge clk);
      checks++;
      if (dout !== exp_dout || dout_stb !== exp_stb || dout_oe !== oe) begin
        failures++; $display("FAIL cycle %0d dout=%h exp=%h stb=%b", i, dout, exp_dout, dout_stb);
      end
    end
    mode = 1; @(negedge clk);
    checks++;
    if (dout !== 0 || dout_stb !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
