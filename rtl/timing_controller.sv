// timing_controller: clock selection and measurement-gate timing for the
// pseudorandom and hybrid test modes.
//
// SEL1 picks the system clock CLOCK: the internal 1 MHz oscillator (low) or
// the external clock (high). A cycle counter clocked on the falling edge of
// CLOCK runs a three-phase sequence: CLEAR (one clock, CLOCK2OS and CLOCK4OS
// high, clearing the PRTPG and the SA), OPEN (GATE_CLOCKS clocks, CLOCK3OS
// high) and CLOSED. In free-running mode (SEL2 low) CLOSED lasts until the
// cycle has taken CYCLE_CLOCKS clocks and the sequence repeats; in one-shot
// mode (SEL2 high) it lasts until the next RESET. Because CLOCK3OS changes on
// falling edges, the gated clock CLOCK1 = CLOCK & CLOCK3OS has whole pulses
// only: exactly GATE_CLOCKS rising edges per gate. CLOCK5OST is CLOCK3OS
// delayed by half a clock (re-timed on the rising edge); its fall marks the
// moment the finished signature may be latched.
//
// Following the design: the 99,999-clock gate, CLOCK3OS switching on falling
// edges, the half-clock CLOCK5OST, the clears at the start of the gate, the
// SEL1/SEL2 meanings and the 200 ms (200,000 clocks at 1 MHz) repetition in
// free-running mode. This design's own choices: the clears last one clock
// before the gate opens, all outputs are active high, RESET is an
// asynchronous active-high reset, SEL1 and SEL2 are static switches changed
// only while RESET is held (the clock multiplexer is a plain combinational
// select), and after RESET the first gate starts at once in both modes.
//
// Downstream blocks are clocked by `clk` and use CLOCK3OS as their enable,
// which is equivalent to clocking them with CLOCK1; `clock1` is provided for
// the test fixture and for observation.
module timing_controller #(
  parameter int unsigned GATE_CLOCKS  = ate_pkg::DEF_GATE_CLOCKS,
  parameter int unsigned CYCLE_CLOCKS = ate_pkg::DEF_CYCLE_CLOCKS
) (
  input  logic clk_int,    // internal 1 MHz oscillator
  input  logic clk_ext,    // external clock
  input  logic sel1,       // 0: internal clock, 1: external clock
  input  logic sel2,       // 0: free-running, 1: one-shot
  input  logic rst,        // master RESET
  output logic clk,        // selected system clock CLOCK
  output logic clock1,     // gated clock, CLOCK inside the gate
  output logic clock2os,   // clears the PRTPG at the start of the gate
  output logic clock3os,   // gate window
  output logic clock4os,   // clears the SA at the start of the gate
  output logic clock5ost   // CLOCK3OS delayed by half a clock
);

  localparam int unsigned CW = $clog2(CYCLE_CLOCKS + 1);

  typedef enum logic [1:0] {ST_CLEAR, ST_OPEN, ST_CLOSED} phase_e;

  phase_e        phase, phase_n;
  logic [CW-1:0] cnt, cnt_n;

  assign clk = sel1 ? clk_ext : clk_int;

  always_comb begin
    phase_n = phase;
    cnt_n   = cnt + 1'b1;
    unique case (phase)
      ST_CLEAR:  phase_n = ST_OPEN;
      ST_OPEN:   if (cnt == CW'(GATE_CLOCKS)) phase_n = ST_CLOSED;
      ST_CLOSED: begin
        if (sel2) begin
          cnt_n = cnt;                       // one-shot: wait for RESET
        end else if (cnt == CW'(CYCLE_CLOCKS - 1)) begin
          phase_n = ST_CLEAR;
          cnt_n   = '0;
        end
      end
      default:   phase_n = ST_CLEAR;
    endcase
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) begin
      phase    <= ST_CLEAR;
      cnt      <= '0;
      clock2os <= 1'b1;
      clock4os <= 1'b1;
      clock3os <= 1'b0;
    end else begin
      phase    <= phase_n;
      cnt      <= cnt_n;
      clock2os <= (phase_n == ST_CLEAR);
      clock4os <= (phase_n == ST_CLEAR);
      clock3os <= (phase_n == ST_OPEN);
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) clock5ost <= 1'b0;
    else     clock5ost <= clock3os;
  end

  assign clock1 = clk & clock3os;

  initial begin
    assert (CYCLE_CLOCKS > GATE_CLOCKS + 1)
      else $error("CYCLE_CLOCKS must exceed GATE_CLOCKS + 1");
  end

endmodule
