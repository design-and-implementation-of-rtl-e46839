// hex_display: six-digit hexadecimal display driver for the signature.
//
// A 24-bit display register follows the signature on every rising clock edge
// while CLOCK3OS is low and holds while CLOCK3OS is high. The display thus
// shows the signature only outside the measurement gate, and during a gate it
// keeps showing the previous measurement's result while the analyzer
// computes the new one. Each 4-bit nibble of the register is decoded into the
// seven segments a..g of one digit (digit 0 shows bits 3..0). With
// `mono_sel` high the register takes the 16-bit signature of the
// monostable-multivibrator analyzer instead; digits 5..4 are then dark.
//
// Following the design: a hexadecimal display of the 24-bit signature or the
// 16-bit monostable signature, updated only while CLOCK3OS is low, with the
// previous signature staying visible during a gate. This design's own
// choices: the clocked hold register (one clock of delay), active-high
// segments, seg[d][0] = a ... seg[d][6] = g, the usual hexadecimal glyphs
// (lower-case b and d), and the mono_sel input.
module hex_display
  import ate_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic [SIG_W-1:0]          sig,
  input  logic [15:0]               mono_sig,
  input  logic                      mono_sel,
  input  logic                      clock3os,
  output logic [NIBBLES-1:0][6:0]   seg
);

  logic [SIG_W-1:0] shown;
  logic             shown_mono;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      shown      <= '0;
      shown_mono <= 1'b0;
    end else if (!clock3os) begin
      shown      <= mono_sel ? SIG_W'(mono_sig) : sig;
      shown_mono <= mono_sel;
    end
  end

  function automatic logic [6:0] glyph(input logic [3:0] h);
    unique case (h)          //  gfedcba
      4'h0: glyph = 7'b0111111;
      4'h1: glyph = 7'b0000110;
      4'h2: glyph = 7'b1011011;
      4'h3: glyph = 7'b1001111;
      4'h4: glyph = 7'b1100110;
      4'h5: glyph = 7'b1101101;
      4'h6: glyph = 7'b1111101;
      4'h7: glyph = 7'b0000111;
      4'h8: glyph = 7'b1111111;
      4'h9: glyph = 7'b1101111;
      4'hA: glyph = 7'b1110111;
      4'hB: glyph = 7'b1111100;
      4'hC: glyph = 7'b0111001;
      4'hD: glyph = 7'b1011110;
      4'hE: glyph = 7'b1111001;
      default: glyph = 7'b1110001;  // F
    endcase
  endfunction

  always_comb begin
    for (int d = 0; d < NIBBLES; d++)
      seg[d] = (shown_mono && d >= 4) ? 7'b0 : glyph(shown[d*4 +: 4]);
  end

endmodule
