// bt_ctrl_fsm: the control state machine of the Bluetooth radio interface.
//
// After reset it programs four radio registers in a fixed order, each with a
// load state followed by a program state: Control (LOAD1/PROGRAM1), CHP
// control (LOAD2/PROGRAM2), Enable (LOAD3/PROGRAM3) and Channel
// (LOAD4/PROGRAM4). A load state lasts one SI_CLK period: ld is high, so at its
// end the shift registers take the IR+DR scan words and the phase counter is
// cleared. The program state keeps ce high, shifting one bit per period, and
// is left on the tick at which the phase counter reaches FULL_EXIT (10111):
// 23 periods, so load and shift take 24 periods, one per scan bit. The last
// scan bit (SI_CMS = 0, back to Run/Idle) is on the lines during the period
// of the state that follows.
//
// Then it waits in IDLE. When hop is high at an SI_CLK tick it moves to LOAD,
// which loads a DR-only scan (r_sel = 1) of the frequency ROM entry at
// DATA_Add, and PROGRAM, which sends it and returns to IDLE when the phase
// reaches HOP_EXIT (01100): 12 periods, 13 with the load. The ROM address counter VAR0 counts
// every ld; when it reads HOPS-1 (74) the hop goes through RESETDATA_Add
// instead of LOAD, which clears VAR0 so that the sequence restarts at 0.
// DATA_Add, the frequency ROM address, is a register that follows VAR0 in
// IDLE, LOAD and RESETDATA_Add.
//
// All registers change only on tick (one system clock cycle per SI_CLK
// period). Outputs ld, ce, r_sel, cntlmem_add and ready are decoded from the
// state. A hop takes 13 SI_CLK periods from the tick that accepts it back to
// IDLE; power-up programming takes 97 (ini, then 4 x 24).
//
// States, state outputs, exit conditions and the VAR0 rule follow the design
// description's state diagram. Setting r_sel in RESETDATA_Add, leaving out the
// diagram's sel and rst outputs (whose use is not described) and the ready
// output are this design's own.
module bt_ctrl_fsm
  import bt_pkg::*;
#(
  parameter int unsigned PHASE_W   = 8,
  parameter int unsigned HOPS      = 75,
  parameter int unsigned FULL_EXIT = 23,
  parameter int unsigned HOP_EXIT  = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  logic               hop,
  input  logic [PHASE_W-1:0] phase,
  output logic               ld,
  output logic               ce,
  output logic               r_sel,
  output logic [2:0]         cntlmem_add,
  output logic [7:0]         data_add,
  output logic               ready,
  output state_t             state
);

  state_t     next;
  logic [7:0] var0;
  logic       addr_ctr_reset;
  logic       full_done, hop_done;

  // A program state is left on the tick at which the phase counter reaches
  // its exit value, i.e. when it reads one less before counting.
  assign full_done = (PHASE_W'(phase + 1'b1) == PHASE_W'(FULL_EXIT));
  assign hop_done  = (PHASE_W'(phase + 1'b1) == PHASE_W'(HOP_EXIT));

  // State outputs (defaults: ld, ce, r_sel, addr_ctr_reset low).
  always_comb begin
    ld             = 1'b0;
    ce             = 1'b0;
    r_sel          = 1'b0;
    addr_ctr_reset = 1'b0;
    cntlmem_add    = 3'b000;
    unique case (state)
      S_LOAD1:     begin cntlmem_add = CM_CONTROL; ld = 1'b1;              end
      S_LOAD2:     begin cntlmem_add = CM_CHP;     ld = 1'b1; ce = 1'b1;   end
      S_LOAD3:     begin cntlmem_add = CM_ENABLE;  ld = 1'b1; ce = 1'b1;   end
      S_LOAD4:     begin cntlmem_add = CM_CHANNEL; ld = 1'b1; ce = 1'b1;   end
      S_PROGRAM1,
      S_PROGRAM2,
      S_PROGRAM3,
      S_PROGRAM4:  ce = 1'b1;
      S_LOAD:      begin ld = 1'b1; ce = 1'b1; r_sel = 1'b1;               end
      S_RESETDATA: begin ld = 1'b1; ce = 1'b1; r_sel = 1'b1;
                         addr_ctr_reset = 1'b1;                            end
      S_PROGRAM:   begin ce = 1'b1; r_sel = 1'b1;                          end
      default:     ;
    endcase
  end

  assign ready = (state == S_IDLE);

  always_comb begin
    next = state;
    unique case (state)
      S_INI:       next = S_LOAD1;
      S_LOAD1:     next = S_PROGRAM1;
      S_PROGRAM1:  if (full_done) next = S_LOAD2;
      S_LOAD2:     next = S_PROGRAM2;
      S_PROGRAM2:  if (full_done) next = S_LOAD3;
      S_LOAD3:     next = S_PROGRAM3;
      S_PROGRAM3:  if (full_done) next = S_LOAD4;
      S_LOAD4:     next = S_PROGRAM4;
      S_PROGRAM4:  if (full_done) next = S_IDLE;
      S_IDLE:      if (hop) next = (var0 == 8'(HOPS - 1)) ? S_RESETDATA : S_LOAD;
      S_LOAD,
      S_RESETDATA: next = S_PROGRAM;
      S_PROGRAM:   if (hop_done) next = S_IDLE;
      default:     next = S_INI;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_INI;
      var0     <= '0;
      data_add <= '0;
    end else if (tick) begin
      state <= next;

      // VAR0 := (VAR0 + 1) when ld, synchronous reset by addr_ctr_reset.
      if (addr_ctr_reset) var0 <= '0;
      else if (ld)        var0 <= var0 + 1'b1;

      unique case (state)
        S_INI:   data_add <= 8'd5;
        S_LOAD1: data_add <= 8'd1;
        S_LOAD2: data_add <= 8'd3;
        S_LOAD3: data_add <= 8'd5;
        S_LOAD4: data_add <= 8'd0;
        S_IDLE, S_LOAD, S_RESETDATA: data_add <= var0;
        default: ;
      endcase
    end
  end

  // A DR-only hop is only ever started from IDLE, and the init sequence never
  // selects the frequency ROM.
  assert property (@(posedge clk) disable iff (rst)
                   (tick && (next == S_LOAD || next == S_RESETDATA)) |-> state == S_IDLE);
  assert property (@(posedge clk) disable iff (rst) ld |-> !(r_sel ^ (state inside {S_LOAD, S_RESETDATA})));

endmodule
