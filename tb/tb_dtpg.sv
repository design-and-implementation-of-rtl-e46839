// tb_dtpg: self-checking test of the deterministic pattern generator.
//
// Loads the ten bytes of a pattern with the byte strobes, checks that the
// outputs do not move until DCLK and then take the whole 80-bit pattern at
// once. Uses the first pattern of the deterministic-mode example,
// 50BE_7E16_4D42_F00F_55AA, then random patterns, random byte orders and a
// partial reload (unloaded bytes keep their staged value).
module tb_dtpg;
  import ate_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [7:0]  pdata = '0;
  logic [9:0]  byte_stb = '0;
  logic        dclk = 1'b0;
  logic [79:0] tpg;
  logic [79:0] staged, applied;
  int          checks = 0, failures = 0;

  dtpg dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [79:0] got, logic [79:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %020h expected %020h", what, got, exp);
    end
  endtask

  // The data port is synchronized by two flops: hold it before the strobe
  task automatic load_byte(int k, logic [7:0] b);
    @(negedge clk) pdata = b;
    repeat (3) @(negedge clk);
    byte_stb[k] = 1'b1;
    @(negedge clk) byte_stb = '0;
    staged[k*8 +: 8] = b;
  endtask

  task automatic pulse_dclk();
    @(negedge clk) dclk = 1'b1;
    @(negedge clk) dclk = 1'b0;
    applied = staged;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    staged = '0;
    applied = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check("after reset", tpg, '0);

    begin
      logic [79:0] p;
      p = 80'h50BE_7E16_4D42_F00F_55AA;
      for (int k = 0; k < 10; k++) begin
        load_byte(k, p[k*8 +: 8]);
        check("outputs wait for DCLK", tpg, '0);
      end
      pulse_dclk();
      check("example pattern", tpg, p);
    end

    for (int n = 0; n < 30; n++) begin
      int order [10];
      int nload;
      foreach (order[i]) order[i] = i;
      order.shuffle();
      nload = (n % 3 == 0) ? 1 + ($urandom % 9) : 10;
      for (int i = 0; i < nload; i++) begin
        load_byte(order[i], 8'($urandom));
        check("outputs hold while loading", tpg, applied);
      end
      pulse_dclk();
      check("pattern applied", tpg, applied);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
