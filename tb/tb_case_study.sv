// tb_case_study: good-board / faulty-board signature run on a model of a
// small TTL board, at the tester's default sizes.
//
// The board is 24 gates (inverters, 2-input NANDs, 3-input ANDs and NANDs,
// parts U1..U9) driven by the first 22 PRTPG outputs; its 24 test points
// TP1..TP24 plus VCC, GND and the 22 driven inputs make 48 probed nodes.
// Programming pass: the tester runs free, the probe moves to the next node
// after every gate, and each latched signature is stored as the node's good
// signature; all 48 must equal the published good signatures. Testing pass:
// the outputs of U3A and U3B are stuck at 1 and the output of U4A at 0; the
// 48 measured signatures must equal the published measured ones (stuck-at-1
// nodes read like VCC, 299BD5; stuck-at-0 like GND, 000000). The testbench
// then prints the status report and back-traces it as the host software
// does: a failing node whose inputs all pass is a source fault. The sources
// must be exactly U3A, U3B and U4A. Each gate must hold 99,999 CLOCK1 edges
// and gates must repeat every 200,000 clocks.
module tb_case_study;
  import ate_pkg::*;

  logic            clk_int = 1'b0, clk_ext = 1'b0;
  logic            rst = 1'b1, sel1 = 1'b0, sel2 = 1'b0;
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

  always #500 clk_int = ~clk_int;

  localparam int NODES = 48;   // 0 VCC, 1 GND, 2..23 TTL-TPG0..21, 24..47 TP1..TP24
  string node_name [NODES];
  logic [23:0] pub_good [NODES] = '{
    24'h299BD5, 24'h000000,
    24'h02775E, 24'h413BAF, 24'h209DD7, 24'h504EEB, 24'h682775, 24'h3413BA,
    24'h5A09DD, 24'h6D04EE, 24'h768277, 24'h7B413B, 24'h7DA09D, 24'h3ED04E,
    24'h5F6827, 24'h6FB413, 24'h37DA09, 24'h5BED04, 24'h6DF682, 24'h76FB41,
    24'h3B7DA0, 24'h5DBED0, 24'h6EDF68, 24'h376FB4,
    24'h2BEC8B, 24'h68A07A, 24'h090602, 24'h7E8262, 24'h48C13E, 24'h67897A,
    24'h478208, 24'h47997E, 24'h0930E9, 24'h34E6DC, 24'h41C3B7, 24'h3C5BBE,
    24'h7D3972, 24'h34A313, 24'h4E83B3, 24'h3449B5, 24'h6F7C6A, 24'h010EDD,
    24'h5498C5, 24'h452983, 24'h70F39E, 24'h033CF6, 24'h543873, 24'h1729AC};
  logic [23:0] pub_meas [NODES];
  logic [23:0] good [NODES], measured [NODES];

  // inputs of each test point (node numbers), -1 = unused; used for back-tracing
  int fanin [24][3] = '{
    '{2, -1, -1}, '{3, -1, -1}, '{4, -1, -1},          // TP1..TP3  U1A..U1C
    '{24, 25, 26}, '{8, 27, -1}, '{15, 16, 28},        // TP4 U2A, TP5 U5A, TP6 U7B
    '{5, 25, 26}, '{9, 30, -1}, '{17, 31, 34},         // TP7 U2B, TP8 U5B, TP9 U7C
    '{6, 24, 26}, '{10, 33, -1}, '{18, 34, 36},        // TP10 U2C, TP11 U5C, TP12 U8A
    '{5, 6, 26}, '{11, 36, -1}, '{19, 20, 37},         // TP13 U3A, TP14 U5D, TP15 U8B
    '{7, 24, 25}, '{12, 39, -1}, '{21, 22, 40},        // TP16 U3B, TP17 U6A, TP18 U8C
    '{5, 7, 25}, '{13, 42, -1}, '{23, 43, 45},         // TP19 U3C, TP20 U6B, TP21 U9A
    '{14, 46, 47}, '{6, 7, 24}, '{5, 6, 7}};           // TP22 U7A, TP23 U4A, TP24 U4B
  string part [24] = '{"U1A", "U1B", "U1C", "U2A", "U5A", "U7B", "U2B", "U5B", "U7C",
                       "U2C", "U5C", "U8A", "U3A", "U5D", "U8B", "U3B", "U6A", "U8C",
                       "U3C", "U6B", "U9A", "U7A", "U4A", "U4B"};

  int   node = 0;
  logic faulty = 1'b0;
  logic [21:0] t;
  logic [24:1] tp;

  // board model: 74LS04 (U1), 74LS11 (U2..U4), 74LS00 (U5, U6), 74LS10 (U7..U9)
  always_comb begin
    t      = tpg_pr[21:0];
    tp[1]  = ~t[0];
    tp[2]  = ~t[1];
    tp[3]  = ~t[2];
    tp[4]  = tp[1] & tp[2] & tp[3];
    tp[5]  = ~(t[6] & tp[4]);
    tp[6]  = ~(t[13] & t[14] & tp[5]);
    tp[7]  = t[3] & tp[2] & tp[3];
    tp[8]  = ~(t[7] & tp[7]);
    tp[10] = t[4] & tp[1] & tp[3];
    tp[11] = ~(t[8] & tp[10]);
    tp[9]  = ~(t[15] & tp[8] & tp[11]);
    tp[13] = faulty ? 1'b1 : (t[3] & t[4] & tp[3]);
    tp[12] = ~(t[16] & tp[11] & tp[13]);
    tp[14] = ~(t[9] & tp[13]);
    tp[15] = ~(t[17] & t[18] & tp[14]);
    tp[16] = faulty ? 1'b1 : (t[5] & tp[1] & tp[2]);
    tp[17] = ~(t[10] & tp[16]);
    tp[18] = ~(t[19] & t[20] & tp[17]);
    tp[19] = t[3] & t[5] & tp[2];
    tp[20] = ~(t[11] & tp[19]);
    tp[23] = faulty ? 1'b0 : (t[4] & t[5] & tp[1]);
    tp[24] = t[3] & t[4] & t[5];
    tp[22] = ~(t[12] & tp[23] & tp[24]);
    tp[21] = ~(t[21] & tp[20] & tp[22]);
    unique case (node) inside
      0:       probe = 1'b1;
      1:       probe = 1'b0;
      [2:23]:  probe = t[node - 2];
      default: probe = tp[node - 23];
    endcase
  end

  int checks = 0, failures = 0;
  int c1_edges = 0, sys_edges = 0, gates = 0;
  int starts [$];

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clock1) c1_edges++;
  always @(posedge clk_sys) sys_edges++;
  always @(posedge clock3os) if (!rst) begin
    c1_edges = 0;
    starts.push_back(sys_edges);
  end
  always @(negedge clock3os) if (!rst) begin
    gates++;
    expect_true("99,999 CLOCK1 edges per gate", c1_edges == DEF_GATE_CLOCKS);
  end

  initial begin
    #30_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure_all(output logic [23:0] s [NODES]);
    for (int n = 0; n < NODES; n++) begin
      int g;
      node = n;
      g = gates;
      wait (gates == g + 1);
      repeat (3) @(posedge clk_sys);
      s[n] = siglatch;
    end
  endtask

  initial begin
    node_name[0] = "VCC";
    node_name[1] = "GND";
    for (int i = 0; i < 22; i++) node_name[2 + i] = $sformatf("TTL-TPG%0d", i);
    for (int i = 0; i < 24; i++) node_name[24 + i] = $sformatf("TP%0d", i + 1);
    pub_meas = pub_good;
    pub_meas[35] = 24'h61A7AC;  pub_meas[36] = 24'h299BD5;  pub_meas[37] = 24'h52DAEE;
    pub_meas[38] = 24'h496F9F;  pub_meas[39] = 24'h299BD5;  pub_meas[40] = 24'h543B48;
    pub_meas[41] = 24'h2C6753;  pub_meas[44] = 24'h244BE3;  pub_meas[45] = 24'h299BD5;
    pub_meas[46] = 24'h000000;

    #3000 rst = 1'b0;
    // the first gate opens at once: let it pass so that node 0 gets a whole gate
    wait (gates == 1);

    // programming pass on the good board
    measure_all(good);
    for (int n = 0; n < NODES; n++)
      expect_true($sformatf("good signature %s", node_name[n]), good[n] == pub_good[n]);

    // testing pass on the faulty board
    faulty = 1'b1;
    measure_all(measured);
    for (int n = 0; n < NODES; n++)
      expect_true($sformatf("measured signature %s", node_name[n]), measured[n] == pub_meas[n]);

    $display("NODE        Good    Measured  Status");
    for (int n = 0; n < NODES; n++)
      $display("%-10s  %6h  %6h    %s", node_name[n], good[n], measured[n],
               (good[n] == measured[n]) ? "PASS" : "FAIL");

    // back-tracing: a failing test point whose inputs all pass is a source
    begin
      string sources = "";
      for (int i = 0; i < 24; i++) begin
        int  n;
        logic all_in_pass;
        n = 24 + i;
        all_in_pass = 1'b1;
        for (int j = 0; j < 3; j++)
          if (fanin[i][j] >= 0 && good[fanin[i][j]] != measured[fanin[i][j]]) all_in_pass = 1'b0;
        if (good[n] != measured[n] && all_in_pass) sources = {sources, part[i], " "};
      end
      $display("source faulty nodes: %s", sources);
      expect_true("source faults U3A, U3B, U4A", sources == "U3A U3B U4A ");
    end

    for (int i = 1; i < starts.size(); i++)
      expect_true("200,000-clock repetition", starts[i] - starts[i-1] == DEF_CYCLE_CLOCKS);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
