// bt_freq_rom: frequency hop ROM, 128 x 8, holding the Channel register value
// for each step of a 75-step hop sequence.
//
// The state machine's DATA_Add (8 bits) addresses it; the ROM uses the low
// $clog2(DEPTH) bits. Entries 0 .. HOPS-1 hold bt_pkg::hop_channel(i), entries
// from HOPS up hold 0. Read is combinational.
//
// The 128 x 8 size and the 75 hops follow the design description; the hop
// sequence (a fixed step through the 79 Bluetooth channels) is this design's
// placeholder for the real one.
module bt_freq_rom
  import bt_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = REG_DATA_W,
  parameter int unsigned HOPS  = 75
) (
  input  logic [7:0]       addr,
  output logic [WIDTH-1:0] value
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] rom [DEPTH];

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++)
      rom[i] = (i < HOPS) ? WIDTH'(hop_channel(i)) : '0;
  end

  assign value = rom[addr[AW-1:0]];

endmodule
