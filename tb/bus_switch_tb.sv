// bus_switch_tb: drives random values on both sides of one bus switch in its
// three configurations (disabled, input side, output side) and compares every
// RAM-side and bus-side output with the expected routing.
module bus_switch_tb;
  localparam int AW = 16, DW = 8;
  logic enable, to_input;
  logic [AW-1:0] in_addr, out_addr, ram_addr;
  logic in_we, out_drive, ram_we;
  logic [DW-1:0] in_data, out_data, ram_wdata, ram_rdata;
  int checks = 0, failures = 0;

  bus_switch #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      enable = 1'($urandom); to_input = 1'($urandom);
      in_addr = AW'($urandom); out_addr = AW'($urandom); in_we = 1'($urandom);
      in_data = DW'($urandom); ram_rdata = DW'($urandom);
      #1;
      if (!enable) begin
        chk(ram_we == 0 && out_drive == 0 && out_data == 0, "disabled");
      end else if (to_input) begin
        chk(ram_addr == in_addr, "in addr");
        chk(ram_we == in_we, "in we");
        chk(ram_wdata == in_data, "in data");
        chk(out_drive == 0 && out_data == 0, "in: bus idle");
      end else begin
        chk(ram_addr == out_addr, "out addr");
        chk(ram_we == 0, "out: no write");
        chk(out_drive == 1 && out_data == ram_rdata, "out data");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
