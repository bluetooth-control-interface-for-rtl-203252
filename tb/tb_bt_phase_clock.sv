// tb_bt_phase_clock: checks the SI_CLK divider and the phase counter.
//
// A reference divider and phase counter, written here from the specification
// (SI_CLK = bit 3 of a 4-bit system clock counter, tick when the counter is
// 15, phase cleared by clr and counted by en on a tick), run beside the block
// under random clr/en. Also checks SI_CLK's period (16 clocks) and duty cycle
// (8 high, 8 low) and that the phase can reach the exit values 23 and 12.
module tb_bt_phase_clock;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       clr = 1'b0, en = 1'b0;
  logic       si_clk, si_tick;
  logic [7:0] phase;

  int checks = 0, failures = 0;

  bt_phase_clock dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ref_div = 0, ref_phase = 0;
  int high_run = 0, low_run = 0;
  logic prev_si = 1'b0;
  logic seen23 = 1'b0, seen12 = 1'b0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 8000; c++) begin
      // New random controls, held for a whole SI_CLK period at a time.
      if (ref_div == 0) begin
        clr = ($urandom_range(0, 19) == 0);
        en  = ($urandom_range(0, 9) != 0);
      end
      #1;
      check(si_clk == (ref_div >= 8), $sformatf("si_clk %b at count %0d", si_clk, ref_div));
      check(si_tick == (ref_div == 15), $sformatf("si_tick %b at count %0d", si_tick, ref_div));
      check(phase == 8'(ref_phase), $sformatf("phase %0d, expected %0d", phase, ref_phase));
      if (phase == 23) seen23 = 1'b1;
      if (phase == 12) seen12 = 1'b1;
      // Period and duty cycle.
      if (si_clk != prev_si) begin
        if (si_clk) begin
          if (c > 20) check(low_run == 8, $sformatf("SI_CLK low for %0d clocks", low_run));
          high_run = 0;
        end else begin
          if (c > 20) check(high_run == 8, $sformatf("SI_CLK high for %0d clocks", high_run));
          low_run = 0;
        end
      end
      prev_si = si_clk;
      if (si_clk) high_run++; else low_run++;
      @(posedge clk);
      if (ref_div == 15) begin
        if (clr)     ref_phase = 0;
        else if (en) ref_phase = (ref_phase + 1) % 256;
      end
      ref_div = (ref_div + 1) % 16;
      @(negedge clk);
    end
    check(seen23 && seen12, "phase never reached the exit values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
