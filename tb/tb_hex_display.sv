// tb_hex_display: self-checking test of the hexadecimal display driver.
//
// The expected glyphs are written as lists of lit segments ("abcdef" for 0)
// and compared with every digit for all 16 values. While CLOCK3OS is high
// the display must keep the value it had when CLOCK3OS rose, whatever the
// signature does; after CLOCK3OS falls it must follow again within one
// clock. In monostable mode it shows the 16-bit signature on digits 3..0 with
// digits 5..4 dark.
module tb_hex_display;
  import ate_pkg::*;

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic [23:0]      sig = '0;
  logic [15:0]      mono_sig = '0;
  logic             mono_sel = 1'b0;
  logic             clock3os = 1'b0;
  logic [5:0][6:0]  seg;
  int               checks = 0, failures = 0;
  string            lit [16];

  hex_display dut (.*);

  always #5 clk = ~clk;

  function automatic logic [6:0] segs(string s);
    logic [6:0] r = '0;
    for (int i = 0; i < s.len(); i++) r[s[i] - "a"] = 1'b1;
    return r;
  endfunction

  task automatic expect_eq(string what, logic [6:0] got, logic [6:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_shows(string what, logic [23:0] v, int ndig);
    for (int d = 0; d < ndig; d++)
      expect_eq($sformatf("%s digit %0d", what, d), seg[d], segs(lit[v[d*4 +: 4]]));
  endtask

  initial begin
    lit = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
            "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int d = 0; d < 6; d++)
      for (int v = 0; v < 16; v++) begin
        sig = 24'(v) << (4 * d);
        @(negedge clk);
        expect_eq($sformatf("digit %0d value %0h", d, v), seg[d], segs(lit[v]));
      end

    // hold during the gate
    sig = 24'h67897A;
    @(negedge clk);
    expect_shows("67897A", 24'h67897A, 6);
    clock3os = 1'b1;
    for (int i = 0; i < 20; i++) begin
      sig = 24'($urandom) & 24'h7FFFFF;
      @(negedge clk);
      expect_shows("hold during gate", 24'h67897A, 6);
    end
    clock3os = 1'b0;
    sig = 24'h2BEC8B;
    @(negedge clk);
    expect_shows("follows after gate", 24'h2BEC8B, 6);

    // monostable signature
    mono_sel = 1'b1;
    mono_sig = 16'hBEEF;
    @(negedge clk);
    expect_shows("mono", 24'h00BEEF, 4);
    for (int d = 4; d < 6; d++) expect_eq("mono blank", seg[d], '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
