// tb_bt_ctrl_rom: reads all eight control ROM entries and compares them with
// the table written out here, and checks that the four registers programmed
// at power-up (entries 4, 5, 6 and 0) have distinct addresses.
module tb_bt_ctrl_rom;

  logic [2:0] addr;
  logic [5:0] reg_addr;
  logic [7:0] reg_value;

  int checks = 0, failures = 0;

  localparam logic [13:0] TABLE [8] = '{
    {6'h07, 8'h00}, {6'h04, 8'h00}, {6'h05, 8'h00}, {6'h06, 8'h00},
    {6'h01, 8'h01}, {6'h02, 8'h01}, {6'h03, 8'h3F}, {6'h00, 8'h00}
  };

  bt_ctrl_rom dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] a4, a5, a6, a0;

  initial begin
    for (int i = 0; i < 8; i++) begin
      addr = 3'(i);
      #1;
      check({reg_addr, reg_value} == TABLE[i],
            $sformatf("entry %0d = %h/%h, expected %h", i, reg_addr, reg_value, TABLE[i]));
      if (i == 0) a0 = reg_addr;
      if (i == 4) a4 = reg_addr;
      if (i == 5) a5 = reg_addr;
      if (i == 6) a6 = reg_addr;
    end
    check(a0 != a4 && a0 != a5 && a0 != a6 && a4 != a5 && a4 != a6 && a5 != a6,
          "power-up registers share an address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
