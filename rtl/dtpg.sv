// dtpg: 80-bit deterministic test pattern generator loaded from the host.
//
// The host writes a pattern byte by byte on the 8-bit data port; strobe
// BYTEk copies the data port into staging byte k (bits 8k+7..8k). DCLK then
// moves all ten staged bytes to the 80 output pins at once, so the circuit
// under test sees each new pattern change in a single step. The data port is
// synchronized into `clk` with the same two-flop delay as the control port
// in the decoder, so the byte a strobe captures is the one on the port when
// the command was released.
//
// Following the design: 80 outputs filled from the 8-bit data port by ten
// byte strobes and applied on DCLK, outputs cleared by the master reset. This
// design's own choices: the two-rank (staging plus output) structure, byte k
// mapping to bits 8k+7..8k, and the synchronizer.
module dtpg
  import ate_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [DATA_W-1:0]   pdata,   // host data port D7..D0
  input  logic [BYTES-1:0]    byte_stb,
  input  logic                dclk,    // apply the staged pattern
  output logic [TPG_W-1:0]    tpg
);

  logic [DATA_W-1:0]             pdata_m, pdata_s;
  logic [BYTES-1:0][DATA_W-1:0]  stage;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pdata_m <= '0;
      pdata_s <= '0;
    end else begin
      pdata_m <= pdata;
      pdata_s <= pdata_m;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      stage <= '0;
      tpg   <= '0;
    end else begin
      for (int k = 0; k < BYTES; k++)
        if (byte_stb[k]) stage[k] <= pdata_s;
      if (dclk) tpg <= stage;
    end
  end

endmodule
