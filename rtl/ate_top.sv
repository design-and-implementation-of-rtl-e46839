// ate_top: hardware part of the signature-analysis automatic tester.
//
// The tester drives a circuit under test (CUT) with 80-bit patterns and
// compacts the response of one probed CUT node into a 23-bit signature.
// Pseudorandom mode: the timing controller opens a gate of GATE_CLOCKS clocks;
// at its start CLOCK2OS clears the PRTPG and CLOCK4OS clears the SA; inside
// it the PRTPG advances on each rising clock edge and the SA takes the probe
// on each falling edge, giving the CUT half a clock to settle. When the gate
// closes the display takes the new signature and CLOCK5OST latches it for the
// host. Deterministic mode: the host writes patterns through the data port,
// and commands on the control port (decoded by the demux) load the DTPG,
// apply each pattern with DCLK (the SA again samples half a clock later),
// clear the SA with DRESET and latch the signature with DLATCH. In both modes
// the host reads the latched signature nibble by nibble on the status port.
// Both pattern buses are always driven; which CUT pins take which bus (the
// hybrid mode combines fixed DTPG bits with PRTPG bits) is decided by the test
// fixture wiring outside this module.
//
// Clocking: one system clock, `clk` selected by SEL1 inside the timing
// controller. The PRTPG, DTPG, decoder and latch run on its rising edge; the
// gate logic and the SA (through its inverted clock input) on its falling
// edge. The DCLK and DRESET strobes are re-timed by one rising edge so that
// the SA acts on the falling edge that follows the pattern change, as it does
// with CLOCK1.
//
// Left outside: the internal 1 MHz oscillator (clk_int input), the
// TTL-to-CMOS level converters on both pattern buses, the monostable
// multivibrator signature analyzer (mono_sig/mono_sel inputs), the probe
// switch and the host computer.
module ate_top
  import ate_pkg::*;
#(
  parameter int unsigned GATE_CLOCKS  = ate_pkg::DEF_GATE_CLOCKS,
  parameter int unsigned CYCLE_CLOCKS = ate_pkg::DEF_CYCLE_CLOCKS
) (
  input  logic                      clk_int,    // internal 1 MHz clock
  input  logic                      clk_ext,    // external clock
  input  logic                      rst,        // master RESET
  input  logic                      sel1,       // clock select
  input  logic                      sel2,       // free-running / one-shot
  input  logic                      probe,      // stream data from the CUT node
  input  logic [DATA_W-1:0]         pc_data,    // host data port D7..D0
  input  logic [CTRL_W-1:0]         pc_ctrl,    // host control port C3..C0
  output logic [STATUS_W-1:0]       pc_status,  // host status port S7..S3
  input  logic [15:0]               mono_sig,   // monostable analyzer signature
  input  logic                      mono_sel,   // display the monostable signature
  output logic [TPG_W-1:0]          tpg_pr,     // PRTPG outputs to the fixture
  output logic [TPG_W-1:0]          tpg_det,    // DTPG outputs to the fixture
  output logic [NIBBLES-1:0][6:0]   seg,        // display segments
  output logic [SIG_W-1:0]          sig,        // signature analyzer contents
  output logic [SIG_W-1:0]          siglatch,   // latched signature
  output logic                      clk_sys,    // selected CLOCK
  output logic                      clock1,     // gated clock inside the gate
  output logic                      clock3os    // gate window
);

  logic                clk, clk_n;
  logic                clock2os, clock4os, clock5ost;
  logic [NSTROBES-1:0] strobe;
  logic [2:0]          sel;
  logic                dclk_q, dreset_q;
  logic [SA_W-1:0]     sa_q;


  timing_controller #(
    .GATE_CLOCKS (GATE_CLOCKS),
    .CYCLE_CLOCKS(CYCLE_CLOCKS)
  ) u_tc (
    .clk_int, .clk_ext, .sel1, .sel2, .rst,
    .clk, .clock1, .clock2os, .clock3os, .clock4os, .clock5ost
  );

  assign clk_n   = ~clk;
  assign clk_sys = clk;

  prtpg u_prtpg (
    .clk, .rst, .clr(clock2os), .en(clock3os), .tpg(tpg_pr)
  );

  demux u_demux (
    .clk, .rst, .ctrl(pc_ctrl), .d7(pc_data[DATA_W-1]), .strobe, .sel
  );

  dtpg u_dtpg (
    .clk, .rst, .pdata(pc_data), .byte_stb(strobe[BYTES-1:0]),
    .dclk(strobe[STB_DCLK]), .tpg(tpg_det)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dclk_q   <= 1'b0;
      dreset_q <= 1'b0;
    end else begin
      dclk_q   <= strobe[STB_DCLK];
      dreset_q <= strobe[STB_DRESET];
    end
  end

  signature_analyzer u_sa (
    .clk(clk_n), .rst,
    .clock1_en(clock3os), .clock4os,
    .dclk_en(dclk_q), .dreset(dreset_q),
    .data(probe), .sig(sa_q)
  );

  assign sig = {{(SIG_W - SA_W){1'b0}}, sa_q};

  sig_latch_mux u_latch (
    .clk, .rst, .sig, .clock5ost, .dlatch(strobe[STB_DLATCH]), .sel,
    .siglatch, .status(pc_status)
  );

  hex_display u_disp (
    .clk, .rst, .sig, .mono_sig, .mono_sel, .clock3os, .seg
  );

endmodule
