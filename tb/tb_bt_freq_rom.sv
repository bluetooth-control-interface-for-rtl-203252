// tb_bt_freq_rom: reads all 256 addresses of the frequency hop ROM.
//
// Entries 0..74 must hold (23 * i) mod 79, a valid channel (below 79), all
// different; entries 75..127 must be 0; bit 7 of the address is ignored.
module tb_bt_freq_rom;

  logic [7:0] addr;
  logic [7:0] value;

  int checks = 0, failures = 0;

  bt_freq_rom dut (.*);

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

  bit used [256];

  initial begin
    for (int i = 0; i < 256; i++) begin
      int unsigned e;
      e = i % 128;
      addr = 8'(i);
      #1;
      if (e < 75) begin
        check(value == 8'((23 * e) % 79), $sformatf("entry %0d = %0d", i, value));
        check(value < 79, $sformatf("entry %0d = %0d is not a channel", i, value));
        if (i < 128) begin
          check(!used[value], $sformatf("channel %0d used twice", value));
          used[value] = 1'b1;
        end
      end else begin
        check(value == 8'd0, $sformatf("unused entry %0d = %0d", i, value));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
