// bt_shift_regs: the two interface shift registers, for SI_CMS and SI_CDI.
//
// Both are LEN-bit left shift registers sharing load, clock enable and clock,
// so the two serial streams stay aligned. On an SI_CLK tick, ld loads
// cms_word / cdi_word in parallel (ld wins over ce); otherwise ce shifts both
// left by one with 0 entering at bit 0. The serial outputs are the MSBs, so a
// loaded word appears on the lines bit 23 first, one bit per SI_CLK period,
// from the cycle after the load. With ld and ce low the lines hold.
//
// The 24-bit length, the left shift, the shared controls and the zero fill
// follow the design description (which builds each register from six 4-bit
// library parts); the synchronous reset is this design's own.
module bt_shift_regs #(
  parameter int unsigned LEN = 24
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           tick,
  input  logic           ld,
  input  logic           ce,
  input  logic [LEN-1:0] cms_word,
  input  logic [LEN-1:0] cdi_word,
  output logic           si_cms,
  output logic           si_cdi
);

  logic [LEN-1:0] cms_q, cdi_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cms_q <= '0;
      cdi_q <= '0;
    end else if (tick && ld) begin
      cms_q <= cms_word;
      cdi_q <= cdi_word;
    end else if (tick && ce) begin
      cms_q <= {cms_q[LEN-2:0], 1'b0};
      cdi_q <= {cdi_q[LEN-2:0], 1'b0};
    end
  end

  assign si_cms = cms_q[LEN-1];
  assign si_cdi = cdi_q[LEN-1];

endmodule
