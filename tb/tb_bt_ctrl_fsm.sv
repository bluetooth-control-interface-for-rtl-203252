// tb_bt_ctrl_fsm: checks the control state machine on its own.
//
// A tick comes every second clock and a reference phase counter in this
// testbench is cleared by ld and counted by ce. Per SI_CLK period the test
// checks the state against the expected sequence (ini, then LOAD1 and 23
// periods of PROGRAM1, and so on for the four power-up registers, then IDLE),
// the decoded outputs of each state (ld, ce, r_sel, CNTLMEM_Add) and, in each
// hop, that LOAD or RESETDATA_Add is followed by 12 periods of PROGRAM and
// that DATA_Add, during the load state, counts 4, 5, ... 74, 0, 1, ... with RESETDATA_Add used exactly
// for entry 74. 160 hops, with random idle gaps between them.
module tb_bt_ctrl_fsm;

  import bt_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       tick = 1'b0;
  logic       hop = 1'b0;
  logic [7:0] phase = '0;
  logic       ld, ce, r_sel, ready;
  logic [2:0] cntlmem_add;
  logic [7:0] data_add;
  state_t     state;

  int checks = 0, failures = 0;
  int n_wrap = 0;

  bt_ctrl_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One SI_CLK period: check the current state and its outputs, then tick.
  task automatic period(input state_t exp, input string what);
    logic       e_ld, e_ce, e_rsel;
    logic [2:0] e_cm;
    e_ld   = exp inside {S_LOAD1, S_LOAD2, S_LOAD3, S_LOAD4, S_LOAD, S_RESETDATA};
    e_ce   = exp inside {S_LOAD2, S_LOAD3, S_LOAD4, S_PROGRAM1, S_PROGRAM2, S_PROGRAM3,
                         S_PROGRAM4, S_LOAD, S_RESETDATA, S_PROGRAM};
    e_rsel = exp inside {S_LOAD, S_RESETDATA, S_PROGRAM};
    e_cm   = (exp == S_LOAD1) ? 3'b100 : (exp == S_LOAD2) ? 3'b101 :
             (exp == S_LOAD3) ? 3'b110 : 3'b000;
    @(negedge clk);
    check(state == exp, $sformatf("%s: state %s, expected %s", what, state.name(), exp.name()));
    check(ld == e_ld && ce == e_ce && r_sel == e_rsel,
          $sformatf("%s: ld/ce/r_sel %b%b%b in %s", what, ld, ce, r_sel, exp.name()));
    if (e_ld) check(cntlmem_add == e_cm, $sformatf("%s: CNTLMEM_Add %b", what, cntlmem_add));
    check(ready == (exp == S_IDLE), $sformatf("%s: ready %b", what, ready));
    tick = 1'b1;
    @(posedge clk);
    if (e_ld) phase <= '0; else if (e_ce) phase <= phase + 1'b1;
    #1 tick = 1'b0;
    @(posedge clk);
  endtask

  int idx;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    period(S_INI, "init");
    for (int r = 0; r < 4; r++) begin
      state_t l, p;
      l = (r == 0) ? S_LOAD1 : (r == 1) ? S_LOAD2 : (r == 2) ? S_LOAD3 : S_LOAD4;
      p = (r == 0) ? S_PROGRAM1 : (r == 1) ? S_PROGRAM2 : (r == 2) ? S_PROGRAM3 : S_PROGRAM4;
      period(l, $sformatf("register %0d", r));
      for (int k = 0; k < 23; k++) period(p, $sformatf("register %0d bit %0d", r, k));
    end
    for (int k = 0; k < 3; k++) period(S_IDLE, "idle after init");

    idx = 4;
    for (int h = 0; h < 160; h++) begin
      hop = 1'b1;
      period(S_IDLE, "hop accepted");
      hop = 1'b0;
      @(negedge clk);
      check(data_add == 8'(idx), $sformatf("hop %0d: DATA_Add %0d in the load state, expected %0d", h, data_add, idx));
      period((idx == 74) ? S_RESETDATA : S_LOAD, $sformatf("hop %0d load", h));
      for (int k = 0; k < 12; k++) period(S_PROGRAM, $sformatf("hop %0d bit %0d", h, k));
      if (idx == 74) begin idx = 0; n_wrap++; end else idx++;
      repeat ($urandom_range(0, 2)) period(S_IDLE, "idle gap");
    end
    check(n_wrap == 2, $sformatf("%0d address wraps", n_wrap));

    // Reset in the middle of a hop returns to ini.
    hop = 1'b1;
    period(S_IDLE, "before reset");
    period(S_LOAD, "before reset");
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    hop = 1'b0;
    phase = '0;
    period(S_INI, "after reset");
    period(S_LOAD1, "after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
