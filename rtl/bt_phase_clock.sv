// bt_phase_clock: serial clock generator and phase counter of the control
// interface.
//
// A free-running DIV_W-bit counter on the system clock divides it by 16; its
// top bit ("phase 3") is SI_CLK, 1.25 MHz from a 20 MHz system clock, with a
// 50 % duty cycle. si_tick is high for the one system clock cycle at the end
// of which SI_CLK falls (counter 15 -> 0); everything else in the interface
// advances on that strobe, so the data lines change half an SI_CLK period
// away from the rising edge at which the radio samples them.
//
// The phase counter (PHASE_W bits) counts SI_CLK periods inside a program
// state and gives the state machine its exit condition. On a tick it is
// cleared when clr is high (the state machine's ld, asserted in every load
// state) and otherwise incremented when en is high (the state machine's ce).
//
// The divide-by-16, phase 3 as SI_CLK, the 4-bit and 8-bit counters and the
// clear in every load state follow the design description. Running the phase
// counter from the system clock with a tick enable, instead of clocking it by
// SI_CLK, and the choice of the falling edge are this design's own.
module bt_phase_clock #(
  parameter int unsigned DIV_W   = 4,
  parameter int unsigned PHASE_W = 8
) (
  input  logic               clk,
  input  logic               rst,     // synchronous, active high
  input  logic               clr,
  input  logic               en,
  output logic               si_clk,
  output logic               si_tick,
  output logic [PHASE_W-1:0] phase
);

  logic [DIV_W-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) div <= '0;
    else     div <= div + 1'b1;
  end

  assign si_clk  = div[DIV_W-1];
  assign si_tick = (div == '1);

  always_ff @(posedge clk) begin
    if (rst)                 phase <= '0;
    else if (si_tick && clr) phase <= '0;
    else if (si_tick && en)  phase <= phase + 1'b1;
  end

endmodule
