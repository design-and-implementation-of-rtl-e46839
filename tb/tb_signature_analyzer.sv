// tb_signature_analyzer: self-checking test of the 23-stage signature
// analyzer.
//
// Checks, against a reference compactor kept in the testbench:
//  - a stream of ones from the cleared state gives 1, 3, 7, 15 (the first
//    steps of a constant-high node);
//  - 99,999 ones give 299BD5 and 99,999 zeros give 000000, the signatures of
//    a VCC node and a GND node over one pseudorandom gate;
//  - a random stream with random pauses of both enables and random clears
//    matches the reference bit for bit, through both the pseudorandom
//    (clock1_en/clock4os) and the deterministic (dclk_en/dreset) inputs.
// Each sample takes one clock.
module tb_signature_analyzer;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        clock1_en = 1'b0, clock4os = 1'b0, dclk_en = 1'b0, dreset = 1'b0;
  logic        data = 1'b0;
  logic [22:0] sig;
  logic [22:0] ref_sig;
  int          checks = 0, failures = 0;

  signature_analyzer dut (.*);

  always #5 clk = ~clk;

  // Reference: remainder of the input stream divided by 1 + x^5 + x^23
  function automatic logic [22:0] ref_step(logic [22:0] s, logic d);
    logic nb;
    nb = d ^ s[22] ^ s[4];
    return (s << 1) | 23'(nb);
  endfunction

  task automatic check(string what, logic [22:0] got, logic [22:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %06h expected %06h", what, got, exp);
    end
  endtask

  task automatic clear_sa();
    @(negedge clk) clock4os = 1'b1; clock1_en = 1'b0; dclk_en = 1'b0;
    @(negedge clk) clock4os = 1'b0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check("after reset", sig, '0);

    // constant high node: 1, 3, 7, 15
    clear_sa();
    data = 1'b1;
    clock1_en = 1'b1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      check("ones prefix", sig, 23'((1 << (i + 1)) - 1));
    end

    // full gate of ones and of zeros
    clear_sa();
    data = 1'b1;
    clock1_en = 1'b1;
    repeat (99_999) @(negedge clk);
    clock1_en = 1'b0;
    @(negedge clk);
    check("VCC signature", sig, 23'h299BD5);
    clear_sa();
    data = 1'b0;
    clock1_en = 1'b1;
    repeat (99_999) @(negedge clk);
    clock1_en = 1'b0;
    @(negedge clk);
    check("GND signature", sig, 23'h000000);

    // random stream through both modes' inputs
    clear_sa();
    ref_sig = '0;
    for (int i = 0; i < 5000; i++) begin
      logic en1, en2, c1, c2, d;
      en1 = ($urandom % 4) != 0;
      en2 = ($urandom % 3) == 0;
      c1  = ($urandom % 500) == 0;
      c2  = ($urandom % 500) == 0;
      d   = $urandom % 2;
      clock1_en = en1; dclk_en = en2; clock4os = c1; dreset = c2; data = d;
      if (c1 || c2)        ref_sig = '0;
      else if (en1 || en2) ref_sig = ref_step(ref_sig, d);
      @(negedge clk);
      check("random stream", sig, ref_sig);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
