// bt_radio_model: behavioural model of the Bluetooth radio's serial control
// port, for simulation only (not synthesizable, not part of the design).
//
// At each rising edge of si_clk the port state machine moves on according to
// si_cms: Run/Idle, Select-DR, Select-IR, Capture, Shift, Exit and Update
// states for the instruction (IR) and data (DR) paths, as in a JTAG TAP
// controller. In Shift-IR the bit on si_cdi enters a 6-bit instruction shift
// register LSB first; entering Update-IR copies it to the instruction register,
// which holds the address of the register to write. In Shift-DR the bit enters
// an 8-bit data shift register LSB first; entering Update-DR writes it to the
// register addressed by IR and appends {address, value} to a write log.
//
// Counters for the testbench: ir_updates, dr_updates, wr_count, and the log
// arrays wr_addr / wr_value. in_idle is high while the port is in Run/Idle.
module bt_radio_model #(
  parameter int unsigned LOG_DEPTH = 256
) (
  input  logic si_clk,
  input  logic si_cms,
  input  logic si_cdi
);

  typedef enum logic [3:0] {
    T_IDLE, T_SEL_DR, T_CAP_DR, T_SHIFT_DR, T_EXIT_DR, T_UPD_DR,
    T_SEL_IR, T_CAP_IR, T_SHIFT_IR, T_EXIT_IR, T_UPD_IR
  } tap_t;

  tap_t       tap = T_IDLE;
  logic [5:0] ir_sr = '0;
  logic [5:0] ir = '0;
  logic [7:0] dr_sr = '0;
  logic [7:0] regs [64];
  int         ir_shifts = 0;
  int         dr_shifts = 0;
  int         ir_updates = 0;
  int         dr_updates = 0;
  int         bad_scans = 0;      // wrong shift counts or off-chart paths
  int         wr_count = 0;
  logic [5:0] wr_addr  [LOG_DEPTH];
  logic [7:0] wr_value [LOG_DEPTH];
  logic       in_idle;

  assign in_idle = (tap == T_IDLE);

  initial for (int i = 0; i < 64; i++) regs[i] = '0;

  always @(posedge si_clk) begin
    case (tap)
      T_SHIFT_IR: begin ir_sr <= {si_cdi, ir_sr[5:1]}; ir_shifts <= ir_shifts + 1; end
      T_SHIFT_DR: begin dr_sr <= {si_cdi, dr_sr[7:1]}; dr_shifts <= dr_shifts + 1; end
      T_CAP_IR:   ir_shifts <= 0;
      T_CAP_DR:   dr_shifts <= 0;
      T_EXIT_IR: if (si_cms) begin
        ir <= ir_sr;
        ir_updates <= ir_updates + 1;
        if (ir_shifts != 6) bad_scans <= bad_scans + 1;
      end
      T_EXIT_DR: if (si_cms) begin
        regs[ir] <= dr_sr;
        dr_updates <= dr_updates + 1;
        if (dr_shifts != 8) bad_scans <= bad_scans + 1;
        if (wr_count < LOG_DEPTH) begin
          wr_addr[wr_count]  <= ir;
          wr_value[wr_count] <= dr_sr;
        end
        wr_count <= wr_count + 1;
      end
      default: ;
    endcase

    // Paths the interface must never take: leaving Exit or Capture the
    // other way than the flow chart shows, or Select-IR with 1.
    if ((tap inside {T_EXIT_IR, T_EXIT_DR} && !si_cms) ||
        (tap inside {T_CAP_IR, T_CAP_DR, T_SEL_IR} && si_cms))
      bad_scans <= bad_scans + 1;

    case (tap)
      T_IDLE:     tap <= si_cms ? T_SEL_DR  : T_IDLE;
      T_SEL_DR:   tap <= si_cms ? T_SEL_IR  : T_CAP_DR;
      T_CAP_DR:   tap <= si_cms ? T_EXIT_DR : T_SHIFT_DR;
      T_SHIFT_DR: tap <= si_cms ? T_EXIT_DR : T_SHIFT_DR;
      T_EXIT_DR:  tap <= si_cms ? T_UPD_DR  : T_SHIFT_DR;
      T_UPD_DR:   tap <= si_cms ? T_SEL_DR  : T_IDLE;
      T_SEL_IR:   tap <= si_cms ? T_IDLE    : T_CAP_IR;
      T_CAP_IR:   tap <= si_cms ? T_EXIT_IR : T_SHIFT_IR;
      T_SHIFT_IR: tap <= si_cms ? T_EXIT_IR : T_SHIFT_IR;
      T_EXIT_IR:  tap <= si_cms ? T_UPD_IR  : T_SHIFT_IR;
      T_UPD_IR:   tap <= si_cms ? T_SEL_DR  : T_IDLE;
      default:    tap <= T_IDLE;
    endcase
  end

endmodule
