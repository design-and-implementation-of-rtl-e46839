// tb_demux: self-checking test of the control-port decoder.
//
// Issues every command the way the host does (code set while D7 is high,
// then parked on the idle code 4'hF) and checks that exactly the right strobe
// pulses once, for one clock, when the command is released; that nothing
// fires while D7 is low, however the code changes; that the release by D7
// falling also fires; and that CMD_FIRST/CMD_NEXT step the nibble select
// 0..5 with wrap-around.
module tb_demux;
  import ate_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [3:0]  ctrl = 4'hF;
  logic        d7 = 1'b0;
  logic [12:0] strobe;
  logic [2:0]  sel;
  int          checks = 0, failures = 0;
  int          pulses [13];
  int          pulse_len_bad = 0;
  logic [12:0] strobe_q = '0;

  demux dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    for (int k = 0; k < 13; k++) if (strobe[k]) pulses[k]++;
    if ((strobe & strobe_q) != 0) pulse_len_bad++;
    strobe_q <= strobe;
  end

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic clear_counts();
    foreach (pulses[k]) pulses[k] = 0;
  endtask

  task automatic cmd(logic [3:0] code);
    @(negedge clk) ctrl = code;
    repeat (4) @(negedge clk);
    ctrl = 4'hF;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (pulses[k]) pulses[k] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    d7 = 1'b1;
    repeat (4) @(negedge clk);

    for (int c = 0; c < 13; c++) begin
      clear_counts();
      cmd(4'(c));
      for (int k = 0; k < 13; k++)
        expect_true($sformatf("command %0d strobe %0d", c, k), pulses[k] == ((k == c) ? 1 : 0));
    end

    // D7 low: code changes must not fire anything
    clear_counts();
    d7 = 1'b0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      ctrl = 4'($urandom);
      @(negedge clk);
    end
    ctrl = 4'hF;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 13; k++) expect_true("no strobe while disabled", pulses[k] == 0);

    // release by D7 falling
    clear_counts();
    d7 = 1'b1;
    repeat (3) @(negedge clk);
    ctrl = CMD_DCLK;
    repeat (4) @(negedge clk);
    d7 = 1'b0;
    repeat (4) @(negedge clk);
    expect_true("release by D7", pulses[STB_DCLK] == 1);
    ctrl = 4'hF;
    d7 = 1'b1;
    repeat (4) @(negedge clk);
    expect_true("only one DCLK", pulses[STB_DCLK] == 1);

    // nibble select
    cmd(CMD_FIRST);
    expect_true("FIRST selects 0", sel == 0);
    for (int n = 1; n <= 7; n++) begin
      cmd(CMD_NEXT);
      expect_true($sformatf("NEXT %0d", n), sel == 3'(n % 6));
    end
    cmd(CMD_FIRST);
    expect_true("FIRST again", sel == 0);

    expect_true("strobes last one clock", pulse_len_bad == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
