// sig_latch_mux: signature latch and status-port multiplexer for the
// transfer of a finished signature to the host.
//
// The 24-bit signature is captured when CLOCK5OST falls, half a clock after
// the gate closes (pseudorandom mode), or on the DLATCH strobe
// (deterministic mode). The host's status port has only five inputs, so the
// latched value is sent one nibble at a time: status[4:1] carries nibble
// `sel` (nibble 0 is bits 3..0) and status[0] is high while a measurement is
// in progress (CLOCK5OST), telling the host that the latch is about to
// change. status[4:0] are meant for port pins S7..S3; the host port inverts
// S7 by itself.
//
// Timing: the falling edge of CLOCK5OST is detected on the rising edge of
// `clk`, so the latch loads one clock after CLOCK5OST falls, when the
// signature analyzer has long taken its last bit. The status output is
// combinational from the latch and `sel`.
//
// Following the design: latch on CLOCK5OST, nibble-by-nibble transfer over
// the status port, 3-bit select from the decoder. This design's own choices:
// the DLATCH path, the busy bit on status[0] and nibble order.
module sig_latch_mux
  import ate_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [SIG_W-1:0]    sig,
  input  logic                clock5ost,
  input  logic                dlatch,
  input  logic [2:0]          sel,
  output logic [SIG_W-1:0]    siglatch,
  output logic [STATUS_W-1:0] status
);

  logic c5_q, load;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) c5_q <= 1'b0;
    else     c5_q <= clock5ost;
  end

  assign load = (c5_q && !clock5ost) || dlatch;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       siglatch <= '0;
    else if (load) siglatch <= sig;
  end

  always_comb begin
    status[STATUS_W-1:1] = '0;
    if (sel < 3'(NIBBLES)) status[STATUS_W-1:1] = siglatch[sel*4 +: 4];
    status[0] = clock5ost;
  end

endmodule
