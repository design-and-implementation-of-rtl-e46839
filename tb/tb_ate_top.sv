// tb_ate_top: end-to-end test of the tester at its default sizes
// (99,999-clock gate, 200,000-clock free-running period, 80-bit generators,
// 23-bit analyzer).
//
// A small model of a circuit under test sits on the PRTPG and DTPG buses and
// a node multiplexer feeds the probe. Expected signatures for pseudorandom
// gates are the published good signatures of the corresponding nodes
// (VCC 299BD5, TTL-TPG0 02775E, ...); for deterministic mode they come from a
// reference compactor in this testbench. The host is modelled by tasks that
// drive the parallel port the way the host software does and read the
// signature back nibble by nibble on the status port.
//
// Sequence: one-shot gate on the internal clock; free-running gates with the
// probe moved between nodes (repeatability, period and gate length are
// checked); one-shot gate on the external clock; hybrid mode (a fixed DTPG
// bit combined with PRTPG bits); deterministic mode with host-loaded
// patterns, DCLK, DRESET and DLATCH; D7 masking of port changes; the display
// holding the previous result during a gate, and the monostable display
// source. Every mechanism is counted and
// one that never happened counts as a failure.
module tb_ate_top;
  import ate_pkg::*;

  // ---------------------------------------------------------------- DUT
  logic            clk_int = 1'b0, clk_ext = 1'b0;
  logic            rst = 1'b1, sel1 = 1'b0, sel2 = 1'b1;
  logic            probe;
  logic [7:0]      pc_data = 8'h00;
  logic [3:0]      pc_ctrl = 4'hF;
  logic [4:0]      pc_status;
  logic [15:0]     mono_sig = 16'h0;
  logic            mono_sel = 1'b0;
  logic [79:0]     tpg_pr, tpg_det;
  logic [5:0][6:0] seg;
  logic [23:0]     sig, siglatch;
  logic            clk_sys, clock1, clock3os;

  ate_top dut (.*);

  always #500 clk_int = ~clk_int;   // 1 MHz internal clock (1 unit = 1 ns)
  always #350 clk_ext = ~clk_ext;   // external clock

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, logic [79:0] got, logic [79:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- CUT model
  // node: 0 VCC, 1 GND, 2..23 TTL-TPG0..21, 24..26 TP1..TP3 (inverters on
  // TTL-TPG0..2), 27 hybrid node TTL-TPG0 XOR DTPG bit 3, 28 deterministic
  // node (parity of DTPG bits selected by a mask)
  localparam logic [79:0] DET_MASK = 80'h8421_0F0F_3C3C_A5A5_1234;
  int node = 0;
  always_comb begin
    unique case (node) inside
      0:        probe = 1'b1;
      1:        probe = 1'b0;
      [2:23]:   probe = tpg_pr[node - 2];
      [24:26]:  probe = ~tpg_pr[node - 24];
      27:       probe = tpg_pr[0] ^ tpg_det[3];
      default:  probe = ^(tpg_det & DET_MASK);
    endcase
  end

  // Good signatures of the modelled nodes over one 99,999-clock gate
  function automatic logic [23:0] good_sig(int n);
    logic [23:0] t [27] = '{
      24'h299BD5, 24'h000000,
      24'h02775E, 24'h413BAF, 24'h209DD7, 24'h504EEB, 24'h682775, 24'h3413BA,
      24'h5A09DD, 24'h6D04EE, 24'h768277, 24'h7B413B, 24'h7DA09D, 24'h3ED04E,
      24'h5F6827, 24'h6FB413, 24'h37DA09, 24'h5BED04, 24'h6DF682, 24'h76FB41,
      24'h3B7DA0, 24'h5DBED0, 24'h6EDF68, 24'h376FB4,
      24'h2BEC8B, 24'h68A07A, 24'h090602};
    return t[n];
  endfunction

  // ---------------------------------------------------------------- observers
  int c1_edges = 0, gate_edges = 0, sys_edges = 0;
  int gate_starts [$];
  int gates_done = 0;
  int cnt_oneshot = 0, cnt_freerun = 0, cnt_ext = 0, cnt_hybrid = 0;
  int cnt_det_pattern = 0, cnt_dreset = 0, cnt_dlatch = 0, cnt_d7_mask = 0;
  int cnt_blank = 0, cnt_mono = 0, cnt_repeat = 0, cnt_readout = 0;

  always @(posedge clock1) c1_edges++;
  always @(posedge clk_sys) sys_edges++;
  always @(posedge clock3os) if (!rst) begin
    c1_edges = 0;
    gate_starts.push_back(sys_edges);
  end
  always @(negedge clock3os) if (!rst) begin
    gates_done++;
    expect_eq("CLOCK1 edges in the gate", 80'(c1_edges), 80'(DEF_GATE_CLOCKS));
  end

  // While the gate is open the display keeps the previous result, which is
  // also what the signature latch holds
  always @(posedge clk_sys) if (!rst && clock3os && !mono_sel && sys_edges % 1000 == 7) begin
    for (int d = 0; d < 6; d++)
      expect_eq("display holds previous signature", 80'(seg[d]), 80'(segs(lit[siglatch[d*4 +: 4]])));
    cnt_blank++;
  end

  // ---------------------------------------------------------------- host model
  task automatic port_wait();
    repeat (4) @(posedge clk_sys);
  endtask

  // Command without data: D7 high, code, back to idle
  task automatic pc_cmd(logic [3:0] code);
    pc_data = 8'h80;
    port_wait();
    pc_ctrl = code;
    port_wait();
    pc_ctrl = 4'hF;
    port_wait();
  endtask

  // Byte load: the byte is captured when the command is released
  task automatic pc_byte(int k, logic [7:0] b);
    pc_data = 8'h80;
    port_wait();
    pc_ctrl = 4'(k);
    port_wait();
    pc_data = b;
    port_wait();
    pc_ctrl = 4'hF;
    port_wait();
  endtask

  task automatic pc_pattern(logic [79:0] p);
    for (int k = 0; k < 10; k++) pc_byte(k, p[k*8 +: 8]);
    pc_cmd(CMD_DCLK);
  endtask

  task automatic pc_read(output logic [23:0] v);
    pc_cmd(CMD_FIRST);
    for (int n = 0; n < 6; n++) begin
      v[n*4 +: 4] = pc_status[4:1];
      if (n < 5) pc_cmd(CMD_NEXT);
    end
    cnt_readout++;
  endtask

  // Lit segments of the hexadecimal glyphs, "abcdef" meaning a..f lit
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] segs(string s);
    logic [6:0] r = '0;
    for (int i = 0; i < s.len(); i++) r[s[i] - "a"] = 1'b1;
    return r;
  endfunction

  task automatic check_display(logic [23:0] v, int ndig);
    for (int d = 0; d < ndig; d++)
      expect_eq($sformatf("display digit %0d", d), 80'(seg[d]), 80'(segs(lit[v[d*4 +: 4]])));
  endtask

  // reference compactor
  function automatic logic [22:0] sa_step(logic [22:0] s, logic d);
    return {s[21:0], d ^ s[22] ^ s[4]};
  endfunction

  // ---------------------------------------------------------------- watchdog
  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    logic [23:0] rd;

    // 1. one-shot gate, internal clock, probe on VCC
    node = 0;
    sel1 = 1'b0; sel2 = 1'b1;
    #3000 rst = 1'b0;
    wait (gates_done == 1);
    repeat (3) @(posedge clk_sys);
    expect_eq("VCC signature", 80'(siglatch), 80'h299BD5);
    expect_eq("PRTPG after one gate", tpg_pr, 80'hBFC7_6761_6954_93DB_BF09);
    pc_read(rd);
    expect_eq("VCC read by host", 80'(rd), 80'h299BD5);
    check_display(24'h299BD5, 6);
    repeat (300_000) @(posedge clk_sys);
    expect_eq("one-shot: no second gate", 80'(gates_done), 80'd1);
    cnt_oneshot++;

    // 2. free-running, internal clock; the probe moves to the next node at
    //    every gate end, each node is measured twice
    rst = 1'b1;
    sel2 = 1'b0;
    node = 2;
    gates_done = 0;
    gate_starts.delete();
    #3000 rst = 1'b0;
    for (int g = 0; g < 6; g++) begin
      int n;
      n = (g < 2) ? 2 : (g < 4) ? 3 : 24;
      node = n;
      wait (gates_done == g + 1);
      repeat (3) @(posedge clk_sys);
      expect_eq($sformatf("free-running signature node %0d", n), 80'(siglatch), 80'(good_sig(n)));
      if (g % 2 == 1) cnt_repeat++;
      cnt_freerun++;
    end
    for (int g = 1; g < gate_starts.size(); g++)
      expect_eq("free-running period", 80'(gate_starts[g] - gate_starts[g-1]), 80'(DEF_CYCLE_CLOCKS));

    // 3. one-shot gates on the external clock, probe on TP2 and TTL-TPG21
    for (int i = 0; i < 2; i++) begin
      rst = 1'b1;
      sel1 = 1'b1; sel2 = 1'b1;
      node = (i == 0) ? 25 : 23;
      gates_done = 0;
      #3000 rst = 1'b0;
      expect_eq("external clock selected", 80'(clk_sys == clk_ext), 80'd1);
      wait (gates_done == 1);
      repeat (3) @(posedge clk_sys);
      expect_eq("signature on external clock", 80'(siglatch), 80'(good_sig(node)));
      cnt_ext++;
    end

    // 4. hybrid: free-running gates while the host holds DTPG bit 3 at 1
    //    and then at 0; the node is TTL-TPG0 XOR that bit, so its good
    //    signature is that of TP1 and then that of TTL-TPG0. The pattern is
    //    loaded during the first gate after RESET and the second gate is
    //    measured.
    sel1 = 1'b0;
    sel2 = 1'b0;
    node = 27;
    for (int i = 0; i < 2; i++) begin
      rst = 1'b1;
      #3000 rst = 1'b0;
      gates_done = 0;
      pc_pattern((i == 0) ? 80'h8 : 80'h0);
      expect_eq("fixed DTPG pattern", tpg_det, (i == 0) ? 80'h8 : 80'h0);
      wait (gates_done == 2);
      repeat (3) @(posedge clk_sys);
      expect_eq("hybrid signature", 80'(siglatch), (i == 0) ? 80'h2BEC8B : 80'h02775E);
      cnt_hybrid++;
    end

    // 5. deterministic mode: no gate is opened by the timing controller in
    //    one-shot mode once its single gate is over
    rst = 1'b1;
    sel2 = 1'b1;
    node = 28;
    #3000 rst = 1'b0;
    gates_done = 0;
    wait (gates_done == 1);
    begin
      logic [22:0] ref_sa;
      logic [79:0] p;
      pc_cmd(CMD_DRESET);
      cnt_dreset++;
      expect_eq("DRESET clears the SA", 80'(sig), 80'(0));
      ref_sa = '0;
      for (int n = 0; n < 40; n++) begin
        p = (n == 0) ? 80'h50BE_7E16_4D42_F00F_55AA : {$urandom, $urandom, 16'($urandom)};
        for (int k = 0; k < 10; k++) begin
          pc_byte(k, p[k*8 +: 8]);
          expect_eq("SA holds while bytes load", 80'(sig), 80'(ref_sa));
        end
        pc_cmd(CMD_DCLK);
        expect_eq("DTPG pattern applied", tpg_det, p);
        ref_sa = sa_step(ref_sa, ^(p & DET_MASK));
        expect_eq("SA after DCLK", 80'(sig), 80'(ref_sa));
        cnt_det_pattern++;
        if (n == 19) begin
          pc_cmd(CMD_DRESET);
          ref_sa = '0;
          cnt_dreset++;
          expect_eq("DRESET mid-sequence", 80'(sig), 80'(0));
        end
      end
      pc_cmd(CMD_DLATCH);
      cnt_dlatch++;
      expect_eq("DLATCH", 80'(siglatch), 80'(ref_sa));
      pc_read(rd);
      expect_eq("deterministic signature read by host", 80'(rd), 80'(ref_sa));
      check_display(24'(ref_sa), 6);

      // D7 low: the port may change freely without any effect
      pc_data = 8'h00;
      port_wait();
      for (int i = 0; i < 60; i++) begin
        pc_ctrl = 4'($urandom);
        pc_data = 8'($urandom) & 8'h7F;
        repeat (2) @(posedge clk_sys);
      end
      pc_ctrl = 4'hF;
      port_wait();
      expect_eq("D7 low: DTPG unchanged", tpg_det, p);
      expect_eq("D7 low: SA unchanged", 80'(sig), 80'(ref_sa));
      expect_eq("D7 low: latch unchanged", 80'(siglatch), 80'(ref_sa));
      cnt_d7_mask++;
    end

    // 6. monostable display source
    mono_sig = 16'h5A3C;
    mono_sel = 1'b1;
    repeat (2) @(posedge clk_sys);
    check_display(24'h005A3C, 4);
    expect_eq("mono: top digits dark", 80'({seg[5], seg[4]}), 80'(0));
    mono_sel = 1'b0;
    cnt_mono++;

    // mechanisms seen
    begin
      string names [12] = '{"one-shot", "free-running", "external clock", "hybrid",
                            "deterministic pattern", "DRESET", "DLATCH", "D7 mask",
                            "display hold", "monostable display", "repeatable signature",
                            "host readout"};
      int    counts [12];
      counts = '{cnt_oneshot, cnt_freerun, cnt_ext, cnt_hybrid, cnt_det_pattern, cnt_dreset,
                 cnt_dlatch, cnt_d7_mask, cnt_blank, cnt_mono, cnt_repeat, cnt_readout};
      for (int i = 0; i < 12; i++) begin
        $display("mechanism %-22s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
