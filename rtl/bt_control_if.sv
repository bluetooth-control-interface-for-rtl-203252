// bt_control_if: Bluetooth radio serial control interface (top level).
//
// Programs the control registers of a Bluetooth radio over its serial control
// port and then re-programs its Channel register on request, for frequency
// hopping. After reset it writes Control, CHP control, Enable and Channel,
// each with a 24-cycle IR+DR scan: SI_CMS steps the radio's port state machine
// through an instruction scan (6-bit register address on SI_CDI, LSB first)
// and a data scan (8-bit value, LSB first). It then waits with ready high.
// Each cycle of SI_CLK in which hop is high starts a hop: the next entry of the
// 75-entry frequency ROM is sent as a 13-cycle DR-only scan, since the Channel
// address is still in the radio's instruction register.
//
// Blocks: bt_phase_clock (SI_CLK = system clock / 16 and the phase counter),
// bt_ctrl_fsm (the state machine), bt_ctrl_rom (register addresses and
// power-up values), bt_freq_rom (hop sequence), bt_load_mux (ROM select and
// scan pattern select) and bt_shift_regs (the SI_CMS and SI_CDI shift
// registers).
//
// Timing: SI_CMS and SI_CDI change with the falling edge of SI_CLK and are
// meant to be sampled by the radio at its rising edge. Power-up programming
// ends 97 SI_CLK periods (1552 system clocks) after reset is released; a hop
// takes 13 periods. hop is sampled once per SI_CLK period, in the system clock
// cycle before SI_CLK falls, and must be synchronous to clk. SI_CDO, the
// radio's data output, is not used: the interface only writes.
module bt_control_if
  import bt_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       hop,
  output logic       si_clk,
  output logic       si_cms,
  output logic       si_cdi,
  output logic       ready,
  output logic [7:0] data_add
);

  localparam int unsigned PHASE_W = 8;

  logic                  tick, ld, ce, r_sel;
  logic [PHASE_W-1:0]    phase;
  logic [2:0]            cntlmem_add;
  logic [REG_ADDR_W-1:0] reg_addr;
  logic [REG_DATA_W-1:0] ctrl_value, freq_value;
  logic [SCAN_LEN-1:0]   cms_word, cdi_word;
  state_t                state;

  bt_phase_clock #(.DIV_W(4), .PHASE_W(PHASE_W)) u_phase (
    .clk, .rst, .clr(ld), .en(ce), .si_clk, .si_tick(tick), .phase
  );

  bt_ctrl_fsm #(.PHASE_W(PHASE_W)) u_fsm (
    .clk, .rst, .tick, .hop, .phase, .ld, .ce, .r_sel, .cntlmem_add,
    .data_add, .ready, .state
  );

  bt_ctrl_rom u_ctrl_rom (
    .addr(cntlmem_add), .reg_addr, .reg_value(ctrl_value)
  );

  bt_freq_rom u_freq_rom (
    .addr(data_add), .value(freq_value)
  );

  bt_load_mux u_mux (
    .r_sel, .reg_addr, .ctrl_value, .freq_value, .cms_word, .cdi_word
  );

  bt_shift_regs #(.LEN(SCAN_LEN)) u_sr (
    .clk, .rst, .tick, .ld, .ce, .cms_word, .cdi_word, .si_cms, .si_cdi
  );

endmodule
