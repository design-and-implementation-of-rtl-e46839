// tb_prtpg: self-checking test of the 80-bit pseudorandom pattern generator.
//
// Checks every step against a reference LFSR in the testbench, that the
// outputs hold while the enable is low, that the clear wins over the enable,
// and that 99,999 steps from the cleared state end in the pattern
// BFC7_6761_6954_93DB_BF09 that the tester shows after one gate. Also checks
// the five consecutive patterns starting at D758_483D_DF50_FD52_DAD9 (a
// stretch of the sequence printed for the running tester) follow each other.
module tb_prtpg;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        clr = 1'b0;
  logic        en  = 1'b0;
  logic [79:0] tpg;
  logic [79:0] ref_tpg;
  int          checks = 0, failures = 0;
  int          steps;
  logic [79:0] seq [5];
  int          seq_pos;

  prtpg dut (.*);

  always #5 clk = ~clk;

  function automatic logic [79:0] ref_step(logic [79:0] s);
    return {s[78:0], ~(s[78] ^ s[8])};
  endfunction

  task automatic check(string what, logic [79:0] got, logic [79:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %020h expected %020h", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq[0] = 80'hD758_483D_DF50_FD52_DAD9;
    seq[1] = 80'hAEB0_907B_BEA1_FAA5_B5B2;
    seq[2] = 80'h5D61_20F7_7D43_F54B_6B64;
    seq[3] = 80'hBAC2_41EE_FA87_EA96_D6C9;
    seq[4] = 80'h7584_83DD_F50F_D52D_AD93;
    seq_pos = 0;

    repeat (2) @(negedge clk);
    rst = 1'b0;
    check("after reset", tpg, '0);

    // one full gate with random stalls checked step by step
    ref_tpg = '0;
    steps   = 0;
    while (steps < 99_999) begin
      en = ($urandom % 8) != 0;
      @(negedge clk);
      if (en) begin
        ref_tpg = ref_step(ref_tpg);
        steps++;
      end
      if (steps % 97 == 0 || !en) check("step", tpg, ref_tpg);
      if (seq_pos < 5 && tpg == seq[seq_pos]) seq_pos++;
      else if (seq_pos > 0 && seq_pos < 5 && en) seq_pos = 0;
    end
    en = 1'b0;
    check("end of gate", tpg, 80'hBFC7_6761_6954_93DB_BF09);
    checks++;
    if (seq_pos != 5) begin
      failures++;
      $display("FAIL printed pattern run not seen (reached %0d)", seq_pos);
    end
    repeat (5) @(negedge clk);
    check("hold", tpg, 80'hBFC7_6761_6954_93DB_BF09);

    // clear wins over enable
    clr = 1'b1; en = 1'b1;
    @(negedge clk);
    check("clear", tpg, '0);
    clr = 1'b0;
    @(negedge clk);
    check("first step", tpg, 80'h1);
    @(negedge clk);
    check("second step", tpg, 80'h3);
    en = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
