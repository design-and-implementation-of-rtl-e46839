// signature_analyzer: 23-stage LFSR signature compactor (type 1, external XOR).
//
// The probed node's bit stream is XORed with the feedback taps of the
// characteristic polynomial 1 + x^5 + x^23 and shifted into stage x1 (bit 0);
// the register shifts towards x23 (bit 22). After the measurement window the
// register holds the remainder of the division of the input stream by the
// polynomial: the signature. Stage order and shift direction follow the
// design's waveforms (a stream of ones from zero gives 1, 3, 7, ...), and a
// 99,999-bit stream of ones gives 299BD5.
//
// Interface: the register samples on the rising edge of `clk`, which the top
// drives with the inverted system clock, so the SA takes each bit on the
// falling edge of CLOCK1 (or DCLK), half a clock after the pattern generators
// have moved. Two sample enables and two synchronous clears, one of each per
// test mode: clock1_en/clock4os for the pseudorandom mode, dclk_en/dreset for
// the deterministic mode. A clear wins over a sample. `rst` is the
// asynchronous master reset. The enables and clears being merged by OR (only
// one mode drives them at a time) is this design's own choice.
module signature_analyzer #(
  parameter int unsigned WIDTH = ate_pkg::SA_W,      // number of stages n
  parameter int unsigned TAP   = ate_pkg::SA_TAP_LO  // inner feedback stage (c_5)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clock1_en,  // pseudorandom mode sample enable (gate open)
  input  logic             clock4os,   // pseudorandom mode clear at gate start
  input  logic             dclk_en,    // deterministic mode sample enable
  input  logic             dreset,     // deterministic mode clear
  input  logic             data,       // probe input from the circuit under test
  output logic [WIDTH-1:0] sig
);

  logic fb;
  assign fb = data ^ sig[WIDTH-1] ^ sig[TAP-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                       sig <= '0;
    else if (clock4os || dreset)   sig <= '0;
    else if (clock1_en || dclk_en) sig <= {sig[WIDTH-2:0], fb};
  end

endmodule
