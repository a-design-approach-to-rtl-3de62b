// output_latch: the system output latch and the output data clock buffer.
//
// While `oe` (the output controller's tri-state control) is low the latch is
// disabled: `dout_oe` is low, `dout` holds its last value and no output data
// clock is produced.  Once `oe` is high, every input data clock pulse latches
// the byte on the output bus into `dout` and emits a one-clk output data
// clock `dout_stb` in the cycle the new byte appears, which tells the next
// processing stage that new data are available.  `mode` high clears the latch.
// The original drove a tri-state bus; here `dout_oe` is a separate
// output-enable signal.
module output_latch #(
  parameter int unsigned DATA_W = fmt_pkg::DATA_W_DEF
) (
  input  logic              clk,
  input  logic              mode,
  input  logic              din_stb,   // input data clock pulse
  input  logic              oe,        // tri-state control from the output controller
  input  logic [DATA_W-1:0] bus_data,  // output bus
  output logic [DATA_W-1:0] dout,
  output logic              dout_oe,
  output logic              dout_stb   // output data clock
);
  always_ff @(posedge clk) begin
    if (mode) begin
      dout     <= '0;
      dout_stb <= 1'b0;
    end else begin
      dout_stb <= din_stb && oe;
      if (din_stb && oe) dout <= bus_data;
    end
  end

  assign dout_oe = oe;
endmodule
