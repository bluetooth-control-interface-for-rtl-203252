// bt_ctrl_rom: control ROM of the interface, eight entries of {6-bit radio
// register address, 8-bit power-up value}.
//
// Read combinationally by the state machine's CNTLMEM_Add during the four
// initial loads: entry 4 is the Control register, 5 the CHP control register,
// 6 the Enable register and 0 the Channel register (see bt_pkg). The other
// entries hold the remaining writable registers.
//
// Eight entries and the entry numbers follow the design description. The
// description calls this an 8x12 ROM but also gives 6 address and 8 value
// bits; the entries here are 14 bits wide so that both fit. The contents
// (CONTENTS, defaulting to bt_pkg::CTRL_ROM) are placeholders to be set from
// the radio's data sheet.
module bt_ctrl_rom
  import bt_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter rom_entry_t  CONTENTS [DEPTH] = CTRL_ROM
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [REG_ADDR_W-1:0]    reg_addr,
  output logic [REG_DATA_W-1:0]    reg_value
);

  rom_entry_t entry;

  always_comb begin
    entry     = CONTENTS[addr];
    reg_addr  = entry.addr;
    reg_value = entry.value;
  end

endmodule
