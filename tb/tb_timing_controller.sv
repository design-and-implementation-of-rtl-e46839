// tb_timing_controller: self-checking test of the gate timing.
//
// Runs the controller with a 10-clock gate and a 25-clock cycle and checks:
//  - CLOCK1 has exactly GATE_CLOCKS rising edges per gate and none outside;
//  - CLOCK3OS changes only while CLOCK is low (falling-edge timing);
//  - CLOCK5OST equals CLOCK3OS delayed by half a clock;
//  - CLOCK2OS and CLOCK4OS pulse for one clock right before each gate;
//  - free-running mode (SEL2 low) repeats the gate every CYCLE_CLOCKS clocks;
//  - one-shot mode (SEL2 high) gives one gate per RESET;
//  - SEL1 switches the system clock from the internal to the external clock.
module tb_timing_controller;

  localparam int unsigned GATE  = 10;
  localparam int unsigned CYCLE = 25;

  logic clk_int = 1'b0, clk_ext = 1'b0;
  logic sel1 = 1'b0, sel2 = 1'b0, rst = 1'b1;
  logic clk, clock1, clock2os, clock3os, clock4os, clock5ost;
  int   checks = 0, failures = 0;

  timing_controller #(.GATE_CLOCKS(GATE), .CYCLE_CLOCKS(CYCLE)) dut (.*);

  always #50 clk_int = ~clk_int;   // internal clock
  always #35 clk_ext = ~clk_ext;   // faster external clock

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Observers
  int   c1_edges = 0;              // CLOCK1 rising edges in the current gate
  int   gates = 0;                 // completed gates
  int   gate_lengths_ok = 0;
  int   clk_edges = 0;             // system clock rising edges since reset
  int   gate_start_edge [$];
  logic c3_prev = 1'b0;
  logic c3_at_neg = 1'b0;

  always @(posedge clock1) c1_edges++;

  always @(posedge clk) begin
    clk_edges++;
    // CLOCK5OST follows CLOCK3OS half a clock later
    if (!rst) expect_true("CLOCK5OST is CLOCK3OS delayed", clock5ost == c3_at_neg);
  end

  always @(negedge clk) c3_at_neg <= clock3os;

  always @(clock3os) if (!rst) begin
    expect_true("CLOCK3OS changes while CLOCK is low", clk == 1'b0);
    if (clock3os) begin
      c1_edges = 0;
      gate_start_edge.push_back(clk_edges);
    end else begin
      gates++;
      expect_true("CLOCK1 edges per gate", c1_edges == GATE);
    end
  end

  // Clear pulses: exactly one clock long, just before the gate opens
  int clr_len = 0;
  always @(negedge clk) begin
    if (!rst) begin
      expect_true("clears together", clock2os == clock4os);
      if (clock2os) begin
        clr_len++;
        expect_true("no clear inside the gate", !clock3os);
      end else if (clr_len != 0) begin
        expect_true("clear lasts one clock", clr_len == 1);
        clr_len = 0;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // free-running with the internal clock
    repeat (3) @(negedge clk_int);
    rst = 1'b0;
    wait (gates == 4);
    expect_true("free-running period",
                gate_start_edge[3] - gate_start_edge[2] == CYCLE &&
                gate_start_edge[2] - gate_start_edge[1] == CYCLE);

    // one-shot: one gate after RESET, then none
    rst = 1'b1;
    sel2 = 1'b1;
    #300;
    gates = 0;
    rst = 1'b0;
    repeat (4 * CYCLE) @(posedge clk);
    expect_true("one-shot gives one gate", gates == 1);
    expect_true("one-shot stays closed", !clock3os && !clock1);
    rst = 1'b1;
    #300;
    rst = 1'b0;
    repeat (3 * CYCLE) @(posedge clk);
    expect_true("RESET reopens the gate", gates == 2);

    // external clock
    rst = 1'b1;
    sel1 = 1'b1;
    #300;
    rst = 1'b0;
    for (int i = 0; i < 20; i++) begin
      #7;
      expect_true("external clock selected", clk == clk_ext);
    end
    repeat (2 * CYCLE) @(posedge clk);
    expect_true("gate on external clock", gates == 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
