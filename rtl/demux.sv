// demux: decoder of the host's 4-bit control port into the tester's control
// strobes, with D7 of the data port as its enable.
//
// The control port (C3..C0, at the connector's electrical levels) and D7 are
// brought into the `clk` domain by two flip-flops each. While D7 is high the
// synchronized code selects one of 16 decoded levels; 4'hF is the idle code.
// Each command acts once, on the clock in which its level is released (the
// code leaves it or D7 drops), so the glitches the host produces while it
// changes several port bits one after another cannot fire a command as long
// as the host holds D7 low, or parks the code on 4'hF, during the change.
//
// Outputs: `strobe` is the 13-bit control bundle (one-clock pulses):
// BYTE0..BYTE9 load the DTPG staging bytes, DCLK applies the staged pattern
// and clocks the SA, DRESET clears the SA, DLATCH latches the signature for
// transfer. `sel` is the 3-bit nibble select of the signature multiplexer:
// CMD_FIRST sets it to 0 and CMD_NEXT advances it (0..5, wrapping).
//
// Following the design: 4 control inputs, D7 disabling the decoder while the
// port changes state, a 13-bit control bundle, a 3-bit select, ten byte
// strobes and DCLK, and 4'hF between commands. This design's own choices: the
// code assignment (ate_pkg::cmd_e), D7 high meaning enabled, action on
// release, the synchronizers and the nibble counter.
module demux
  import ate_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [CTRL_W-1:0]   ctrl,    // control port C3..C0
  input  logic                d7,      // data port bit 7, decoder enable
  output logic [NSTROBES-1:0] strobe,  // BYTE0..9, DCLK, DRESET, DLATCH
  output logic [2:0]          sel      // signature nibble select
);

  logic [CTRL_W-1:0] ctrl_m, ctrl_s;
  logic              d7_m, d7_s;
  logic [15:0]       level, level_q, release_p;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ctrl_m <= CMD_IDLE;
      ctrl_s <= CMD_IDLE;
      d7_m   <= 1'b0;
      d7_s   <= 1'b0;
    end else begin
      ctrl_m <= ctrl;
      ctrl_s <= ctrl_m;
      d7_m   <= d7;
      d7_s   <= d7_m;
    end
  end

  always_comb begin
    level = '0;
    if (d7_s) level[ctrl_s] = 1'b1;
    level[CMD_IDLE] = 1'b0;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) level_q <= '0;
    else     level_q <= level;
  end

  assign release_p = level_q & ~level;
  assign strobe    = release_p[NSTROBES-1:0];

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                                   sel <= '0;
    else if (release_p[CMD_FIRST])             sel <= '0;
    else if (release_p[CMD_NEXT])              sel <= (sel == 3'(NIBBLES - 1)) ? '0 : sel + 1'b1;
  end

  // At most one command can be released per clock
  assert property (@(posedge clk) disable iff (rst) $onehot0(release_p));

endmodule
