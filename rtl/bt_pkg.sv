// bt_pkg: types and constants shared by the Bluetooth radio control interface.
//
// The interface programs radio registers over a four-wire serial port (SI_CLK,
// SI_CMS, SI_CDI, SI_CDO) whose radio side is a JTAG-like state machine: the
// value of SI_CMS at each rising SI_CLK edge steps it through an instruction
// (IR) scan that selects a register by its 6-bit address and a data (DR) scan
// that shifts in its 8-bit value, both LSB first.
//
// Held here: the register and scan widths, the SI_CMS bit patterns for a
// combined IR+DR scan (24 SI_CLK cycles) and for a DR-only scan (13 cycles),
// the state encoding of the control state machine, the contents of the control
// ROM and the formula for the frequency hop ROM.
//
// The widths, the scan lengths, the state names and the ROM entry numbers
// follow the design description. The register addresses and power-up values
// in CTRL_ROM and the hop formula are placeholders of this design: the real
// numbers come from the radio's data sheet.
package bt_pkg;

  localparam int unsigned REG_ADDR_W  = 6;   // radio register address width
  localparam int unsigned REG_DATA_W  = 8;   // radio register data width
  localparam int unsigned SCAN_LEN    = 24;  // SI_CLK cycles of an IR+DR scan
  localparam int unsigned DR_SCAN_LEN = 13;  // SI_CLK cycles of a DR-only scan
  localparam int unsigned BT_CHANNELS = 79;  // Bluetooth hop channels

  // SI_CMS for an IR+DR scan, first bit in bit 23. Starting from Run/Idle:
  //   1 1        Idle -> Select-DR -> Select-IR
  //   0 0        Capture-IR, Shift-IR
  //   0 0 0 0 0 1  six clocks in Shift-IR (address bits), last one exits
  //   1 1        Update-IR, Select-DR
  //   0 0        Capture-DR, Shift-DR
  //   0 x7 1     eight clocks in Shift-DR (value bits), last one exits
  //   1 0        Update-DR, Run/Idle
  localparam logic [SCAN_LEN-1:0] CMS_IR_DR = 24'b1100_0000_0111_0000_0000_0110;

  // Position (bit index, counting down from 23) of the first address bit and of
  // the first value bit in the SI_CDI word of an IR+DR scan.
  localparam int unsigned CDI_ADDR_MSB = 19;  // address bit 0 at bit 19
  localparam int unsigned CDI_DATA_MSB = 9;   // value bit 0 at bit 9

  // A DR-only scan is the last 13 bits of the IR+DR scan, sent first.
  localparam int unsigned DR_SHIFT = SCAN_LEN - DR_SCAN_LEN;  // 11

  // Control state machine states (names as in the state diagram).
  typedef enum logic [3:0] {
    S_INI       = 4'd0,
    S_LOAD1     = 4'd1,
    S_PROGRAM1  = 4'd2,
    S_LOAD2     = 4'd3,
    S_PROGRAM2  = 4'd4,
    S_LOAD3     = 4'd5,
    S_PROGRAM3  = 4'd6,
    S_LOAD4     = 4'd7,
    S_PROGRAM4  = 4'd8,
    S_IDLE      = 4'd9,
    S_LOAD      = 4'd10,
    S_RESETDATA = 4'd11,
    S_PROGRAM   = 4'd12
  } state_t;

  // Control ROM entry numbers (CNTLMEM_Add) of the four registers programmed
  // at power-up.
  localparam logic [2:0] CM_CHANNEL = 3'b000;
  localparam logic [2:0] CM_CONTROL = 3'b100;
  localparam logic [2:0] CM_CHP     = 3'b101;
  localparam logic [2:0] CM_ENABLE  = 3'b110;

  typedef struct packed {
    logic [REG_ADDR_W-1:0] addr;
    logic [REG_DATA_W-1:0] value;
  } rom_entry_t;

  // Control ROM: one entry per writable radio register, {address, power-up
  // value}. Placeholder numbers; entry 7 is unused.
  localparam rom_entry_t CTRL_ROM [8] = '{
    '{addr: 6'h07, value: 8'h00},   // 0: Channel, initial channel 0
    '{addr: 6'h04, value: 8'h00},   // 1: other writable register
    '{addr: 6'h05, value: 8'h00},   // 2: other writable register
    '{addr: 6'h06, value: 8'h00},   // 3: other writable register
    '{addr: 6'h01, value: 8'h01},   // 4: Control, FPGA takes control
    '{addr: 6'h02, value: 8'h01},   // 5: CHP control, charge pump on
    '{addr: 6'h03, value: 8'h3F},   // 6: Enable, control functions on
    '{addr: 6'h00, value: 8'h00}    // 7: unused
  };

  // Frequency hop ROM: channel for hop index i, a step of HOP_MUL through the
  // 79 channels (79 is prime, so the first 79 indices visit every channel once).
  localparam int unsigned HOP_MUL = 23;
  localparam int unsigned HOP_OFS = 0;

  function automatic logic [REG_DATA_W-1:0] hop_channel(int unsigned i);
    return REG_DATA_W'((HOP_MUL * i + HOP_OFS) % BT_CHANNELS);
  endfunction

endpackage
