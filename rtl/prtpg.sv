// prtpg: 80-bit pseudorandom test pattern generator.
//
// An autonomous LFSR of 79 stages with the primitive polynomial
// 1 + x^9 + x^79, followed by one extra stage so that 80 CUT inputs are
// driven. The register shifts from bit 0 towards bit 79; the new bit 0 is the
// XNOR of stage 79 (bit 78) and stage 9 (bit 8). XNOR feedback makes the
// all-zero state a legal start, so the clear (CLOCK2OS) loads zero. From zero,
// 99,999 steps end in BFC7_6761_6954_93DB_BF09, the pattern the design shows
// on its outputs after a gate; the feedback polarity and tap bit positions
// were chosen to reproduce the design's published pattern sequence.
//
// Interface: all on the rising edge of `clk` (the rising edge of CLOCK1 when
// `en` is the gate signal). `clr` is synchronous and wins over `en`; `rst` is
// the asynchronous master reset. `tpg` is a register output, constant while
// `en` is low.
module prtpg #(
  parameter int unsigned WIDTH  = ate_pkg::TPG_W,      // output pins
  parameter int unsigned TAP_HI = ate_pkg::PR_TAP_HI,  // x^79
  parameter int unsigned TAP_LO = ate_pkg::PR_TAP_LO   // x^9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,   // CLOCK2OS
  input  logic             en,    // CLOCK1 (gate open)
  output logic [WIDTH-1:0] tpg
);

  logic fb;
  assign fb = ~(tpg[TAP_HI-1] ^ tpg[TAP_LO-1]);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      tpg <= '0;
    else if (clr) tpg <= '0;
    else if (en)  tpg <= {tpg[WIDTH-2:0], fb};
  end

endmodule
