// tb_bt_shift_regs: loads random words into the two shift registers and reads
// them back serially, MSB first, one bit per tick, against a reference queue.
// Ticks come every 3rd clock; ce is dropped at random (outputs must hold),
// ld and ce are sometimes both high (load must win) and zeros must follow the
// last bit.
module tb_bt_shift_regs;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        tick = 1'b0, ld = 1'b0, ce = 1'b0;
  logic [23:0] cms_word = '0, cdi_word = '0;
  logic        si_cms, si_cdi;

  int checks = 0, failures = 0;

  bt_shift_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] ref_cms = '0, ref_cdi = '0;

  task automatic step(input logic l, input logic c);
    // Two idle clocks, then one clock with tick.
    @(negedge clk); tick = 1'b0; ld = l; ce = c;
    @(negedge clk);
    @(negedge clk); tick = 1'b1;
    @(negedge clk); tick = 1'b0;
    if (l) begin
      ref_cms = cms_word;
      ref_cdi = cdi_word;
    end else if (c) begin
      ref_cms = ref_cms << 1;
      ref_cdi = ref_cdi << 1;
    end
    check(si_cms == ref_cms[23] && si_cdi == ref_cdi[23],
          $sformatf("outputs %b%b, expected %b%b", si_cms, si_cdi, ref_cms[23], ref_cdi[23]));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    #1;
    check(si_cms == 1'b0 && si_cdi == 1'b0, "not cleared by reset");
    for (int w = 0; w < 60; w++) begin
      cms_word = 24'($urandom);
      cdi_word = 24'($urandom);
      step(1'b1, w[0]);
      cms_word = 24'($urandom);       // changes after the load must not matter
      cdi_word = 24'($urandom);
      for (int b = 0; b < 26; b++)
        step(1'b0, $urandom_range(0, 3) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
