// tb_bt_control_if: end-to-end test of the Bluetooth control interface with all
// parameters at their defaults, decoded by a behavioural model of the radio's
// serial port (bt_radio_model).
//
// 1. Holds hop high through power-up programming (it must be ignored), then
//    checks that exactly four IR+DR scans wrote Control, CHP control, Enable
//    and Channel, in that order, with the addresses and values listed below,
//    and that ready rose 97 SI_CLK periods (1552 clocks) after reset.
// 2. Sends 80 single hop requests, more than one pass of the 75-entry hop
//    sequence, so that the ROM address wraps. Each must be a DR-only scan
//    (no new IR update) writing the next hop channel to the Channel address
//    and must take 13 SI_CLK periods.
// 3. Holds hop high for 5 hops: back-to-back hops, one every 14 periods.
// Also checks SI_CLK is the system clock divided by 16 and counts how often
// each mechanism (IR+DR scan, DR-only scan, address wrap, ignored hop during
// power-up, back-to-back hop) happened; a mechanism never seen is a failure.
module tb_bt_control_if;

  localparam int unsigned DIV       = 16;
  localparam int unsigned INIT_TICK = 97;
  localparam int unsigned HOP_TICK  = 13;
  localparam int unsigned N_HOPS    = 80;
  localparam int unsigned N_B2B     = 5;

  // Expected power-up writes: {register address, value} in order Control,
  // CHP control, Enable, Channel.
  localparam logic [5:0] EXP_ADDR  [4] = '{6'h01, 6'h02, 6'h03, 6'h07};
  localparam logic [7:0] EXP_VALUE [4] = '{8'h01, 8'h01, 8'h3F, 8'h00};

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       hop = 1'b0;
  logic       si_clk, si_cms, si_cdi, ready;
  logic [7:0] data_add;

  int checks = 0, failures = 0;
  int n_irdr = 0, n_dronly = 0, n_wrap = 0, n_ignored = 0, n_b2b = 0;

  bt_control_if dut (.*);
  bt_radio_model radio (.si_clk, .si_cms, .si_cdi);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] exp_channel(int unsigned idx);
    return 8'((23 * idx) % 79);
  endfunction

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SI_CLK period and duty cycle, measured on the system clock.
  int hi_cnt = 0, lo_cnt = 0, clk_periods = 0;
  logic si_clk_q = 1'b0;
  always @(posedge clk) if (!rst) begin
    si_clk_q <= si_clk;
    if (si_clk) hi_cnt <= hi_cnt + 1; else lo_cnt <= lo_cnt + 1;
    if (si_clk && !si_clk_q) clk_periods <= clk_periods + 1;
  end

  // Wait, counting system clocks, until ready has the given value.
  task automatic wait_ready(input logic val, output int cycles);
    cycles = 0;
    while (ready !== val) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  int cyc, wr_before, ir_before, idx;

  initial begin
    repeat (3) @(posedge clk);
    hop = 1'b1;                       // asserted during power-up on purpose
    @(negedge clk) rst = 1'b0;

    // ---- power-up programming ----
    wait_ready(1'b1, cyc);
    check(cyc == INIT_TICK * DIV, $sformatf("init took %0d clocks, expected %0d", cyc, INIT_TICK * DIV));
    check(radio.wr_count == 4, $sformatf("init wrote %0d registers", radio.wr_count));
    check(radio.ir_updates == 4, $sformatf("init did %0d IR updates", radio.ir_updates));
    if (radio.wr_count == 4 && radio.ir_updates == 4) n_irdr = 4;
    for (int i = 0; i < 4; i++) begin
      check(radio.wr_addr[i] == EXP_ADDR[i],
            $sformatf("init write %0d address %h, expected %h", i, radio.wr_addr[i], EXP_ADDR[i]));
      check(radio.wr_value[i] == EXP_VALUE[i],
            $sformatf("init write %0d value %h, expected %h", i, radio.wr_value[i], EXP_VALUE[i]));
    end
    if (radio.wr_count == 4) n_ignored = 1;   // hop was high all along
    hop = 1'b0;
    repeat (3 * DIV) @(posedge clk);
    #1;
    check(radio.wr_count == 4, "hop held during power-up started a hop");
    check(radio.in_idle, "radio port not in Run/Idle after power-up");

    // ---- single hops, through one wrap of the ROM address ----
    idx = 4;                          // VAR0 has counted the four power-up loads
    for (int h = 0; h < N_HOPS; h++) begin
      wr_before = radio.wr_count;
      ir_before = radio.ir_updates;
      @(negedge clk) hop = 1'b1;
      wait_ready(1'b0, cyc);
      @(negedge clk) hop = 1'b0;
      wait_ready(1'b1, cyc);
      // From the tick that accepted the hop (when ready fell) to IDLE.
      check(cyc == HOP_TICK * DIV, $sformatf("hop %0d took %0d clocks", h, cyc));
      repeat (2 * DIV) @(posedge clk);
      #1;
      check(radio.wr_count == wr_before + 1, $sformatf("hop %0d wrote %0d registers", h, radio.wr_count - wr_before));
      check(radio.ir_updates == ir_before, $sformatf("hop %0d did an IR scan", h));
      if (radio.wr_count == wr_before + 1 && radio.ir_updates == ir_before) n_dronly++;
      check(radio.wr_addr[wr_before] == EXP_ADDR[3], $sformatf("hop %0d wrote address %h", h, radio.wr_addr[wr_before]));
      check(radio.wr_value[wr_before] == exp_channel(idx),
            $sformatf("hop %0d (entry %0d) wrote %0d, expected %0d", h, idx, radio.wr_value[wr_before], exp_channel(idx)));
      check(radio.in_idle, "radio port not in Run/Idle after a hop");
      if (idx == 74) begin
        idx = 0;
        n_wrap++;
      end else idx++;
    end

    // ---- back-to-back hops with hop held high ----
    wr_before = radio.wr_count;
    @(negedge clk) hop = 1'b1;
    wait_ready(1'b0, cyc);
    for (int h = 1; h < N_B2B; h++) begin
      wait_ready(1'b1, cyc);
      wait_ready(1'b0, cyc);
      check(cyc == DIV, $sformatf("held hop stayed in IDLE %0d clocks", cyc));
      if (cyc == DIV) n_b2b++;
    end
    @(negedge clk) hop = 1'b0;
    wait_ready(1'b1, cyc);
    repeat (2 * DIV) @(posedge clk);
    #1;
    check(radio.wr_count == wr_before + N_B2B, $sformatf("held hop wrote %0d registers", radio.wr_count - wr_before));
    for (int h = 0; h < N_B2B; h++) begin
      check(radio.wr_value[wr_before + h] == exp_channel(idx), $sformatf("held hop %0d value", h));
      idx = (idx == 74) ? 0 : idx + 1;
    end

    check(radio.bad_scans == 0, $sformatf("%0d malformed scans", radio.bad_scans));
    check(hi_cnt > 0 && lo_cnt > 0 && (hi_cnt - lo_cnt <= 1) && (lo_cnt - hi_cnt <= 1),
          $sformatf("SI_CLK duty %0d/%0d", hi_cnt, lo_cnt));
    check((hi_cnt + lo_cnt) / DIV - clk_periods <= 1, $sformatf("SI_CLK periods %0d in %0d clocks", clk_periods, hi_cnt + lo_cnt));

    $display("mechanisms: ir_dr_scans=%0d dr_only_scans=%0d addr_wraps=%0d ignored_power_up_hop=%0d back_to_back=%0d",
             n_irdr, n_dronly, n_wrap, n_ignored, n_b2b);
    check(n_irdr > 0, "no IR+DR scan seen");
    check(n_dronly > 0, "no DR-only scan seen");
    check(n_wrap > 0, "no hop address wrap seen");
    check(n_ignored > 0, "hop during power-up not exercised");
    check(n_b2b > 0, "no back-to-back hop seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
