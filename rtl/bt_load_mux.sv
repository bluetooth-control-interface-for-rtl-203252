// bt_load_mux: the two 2x1 multiplexers in front of the interface shift
// registers.
//
// r_sel = 0 (the four power-up loads): the register value comes from the
// control ROM and the words describe a 24-cycle IR+DR scan. SI_CMS is the
// fixed pattern bt_pkg::CMS_IR_DR; SI_CDI carries the 6-bit register address
// in the six Shift-IR cycles and the 8-bit value in the eight Shift-DR cycles,
// each LSB first, and 0 elsewhere.
// r_sel = 1 (hops): the value comes from the frequency ROM and the words
// describe a 13-cycle DR-only scan, the last 13 bits of the IR+DR scan moved
// to the top of the word (the Channel address stays in the radio's IR).
//
// Both words are sent MSB (bit 23) first. Purely combinational.
// The patterns follow the radio's serial port flow chart and the description's
// hard-wiring of don't-care bits to 0; driving both multiplexers from r_sel is
// this design's reading of which state selects which ROM.
module bt_load_mux
  import bt_pkg::*;
(
  input  logic                  r_sel,
  input  logic [REG_ADDR_W-1:0] reg_addr,
  input  logic [REG_DATA_W-1:0] ctrl_value,
  input  logic [REG_DATA_W-1:0] freq_value,
  output logic [SCAN_LEN-1:0]   cms_word,
  output logic [SCAN_LEN-1:0]   cdi_word
);

  logic [REG_DATA_W-1:0] value;
  logic [SCAN_LEN-1:0]   cdi_full;

  always_comb begin
    value = r_sel ? freq_value : ctrl_value;

    cdi_full = '0;
    for (int unsigned i = 0; i < REG_ADDR_W; i++)
      cdi_full[CDI_ADDR_MSB - i] = reg_addr[i];
    for (int unsigned i = 0; i < REG_DATA_W; i++)
      cdi_full[CDI_DATA_MSB - i] = value[i];

    if (r_sel) begin
      cms_word = CMS_IR_DR << DR_SHIFT;
      cdi_word = cdi_full  << DR_SHIFT;
    end else begin
      cms_word = CMS_IR_DR;
      cdi_word = cdi_full;
    end
  end

endmodule
