// tb_sig_latch_mux: self-checking test of the signature latch and the
// status-port multiplexer.
//
// Checks that the latch takes the signature one clock after CLOCK5OST falls
// and not otherwise, that it also loads on DLATCH, that status[4:1] shows the
// selected nibble (67897A reads A, 7, 9, 8, 7, 6 for select 0..5), that
// selects 6 and 7 read zero, and that status[0] follows CLOCK5OST.
module tb_sig_latch_mux;
  import ate_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [23:0] sig = '0;
  logic        clock5ost = 1'b0;
  logic        dlatch = 1'b0;
  logic [2:0]  sel = '0;
  logic [23:0] siglatch;
  logic [4:0]  status;
  int          checks = 0, failures = 0;

  sig_latch_mux dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic read_all(logic [23:0] exp);
    for (int n = 0; n < 8; n++) begin
      sel = 3'(n);
      #1;
      expect_eq($sformatf("nibble %0d", n), 32'(status[4:1]), (n < 6) ? 32'((exp >> (4 * n)) & 24'hF) : 0);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_eq("after reset", siglatch, 0);

    // a gate: CLOCK5OST high while the signature changes
    clock5ost = 1'b1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) sig = 24'($urandom) & 24'h7FFFFF;
      expect_eq("busy flag", 32'(status[0]), 1);
      expect_eq("latch holds during gate", siglatch, 0);
    end
    sig = 24'h67897A;
    @(negedge clk) clock5ost = 1'b0;
    #1;
    expect_eq("busy cleared", 32'(status[0]), 0);
    expect_eq("not yet latched", siglatch, 0);
    @(negedge clk);
    expect_eq("latched at CLOCK5OST fall", siglatch, 24'h67897A);
    sig = 24'h123456;
    repeat (3) @(negedge clk);
    expect_eq("latch holds after gate", siglatch, 24'h67897A);
    read_all(24'h67897A);

    // deterministic mode latch
    for (int i = 0; i < 20; i++) begin
      logic [23:0] v;
      v = 24'($urandom) & 24'h7FFFFF;
      @(negedge clk) sig = v;
      dlatch = 1'b1;
      @(negedge clk) dlatch = 1'b0;
      sig = ~v;
      @(negedge clk);
      expect_eq("DLATCH", siglatch, v);
      read_all(v);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
