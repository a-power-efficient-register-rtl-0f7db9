// tb_rf_access_graph: self-checking test of the co-access profile counters.
//
// Part 1 replays a five-register profile graph (solo accesses 83, 45, 62, 24
// and 38 for registers R1..R5, ten edge weights between them) as one-port and
// two-port accesses in shuffled order, and checks that the counters
// reproduce every node and edge weight. It then runs the static greedy
// partitioner on the counted graph, as a compiler would, with the registers'
// AVFs (94, 48, 32, 55, 64 %) and a 3-2 split, and checks that it protects
// R1, then R3, then R2. Part 2 checks random traffic against a reference
// count, with a clear in the middle.
module tb_rf_access_graph;
  import prf_pkg::*;

  localparam int unsigned NP = 2;
  localparam int unsigned NR = 16;
  localparam int unsigned NPR = npairs_of(NR);

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic          clr;
  logic [NP-1:0] en;
  logic [3:0]    addr [NP];
  logic [31:0]   solo [NR];
  logic [31:0]   pair [NPR];

  rf_access_graph dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .addr(addr),
                       .solo(solo), .pair(pair));

  // The example graph, registers R1..R5 mapped to architectural 1..5.
  localparam int G_SOLO [5] = '{83, 45, 62, 24, 38};
  localparam int G_AVF  [5] = '{94, 48, 32, 55, 64};
  // edge weights, index [a][b] with a, b = 0..4 for R1..R5
  localparam int G_EDGE [5][5] = '{
    '{ 0, 15, 18,  5,  7},
    '{15,  0, 24,  7, 30},
    '{18, 24,  0, 14, 14},
    '{ 5,  7, 14,  0,  3},
    '{ 7, 30, 14,  3,  0}};

  longint ref_solo [NR];
  longint ref_pair [NPR];

  task automatic drive(input logic [NP-1:0] e, input int a0, input int a1);
    logic [NR-1:0] u;
    @(negedge clk);
    en = e; addr[0] = 4'(a0); addr[1] = 4'(a1);
    u = '0;
    if (e[0]) u[a0] = 1'b1;
    if (e[1]) u[a1] = 1'b1;
    @(posedge clk);
    if ($countones(u) == 1)
      for (int r = 0; r < NR; r++) if (u[r]) ref_solo[r]++;
    for (int i = 0; i < NR; i++)
      for (int j = i + 1; j < NR; j++)
        if (u[i] && u[j]) ref_pair[pair_index(i, j, NR)]++;
  endtask

  task automatic idle_and_compare(input string tag);
    @(negedge clk);
    en = '0;
    #1;
    for (int r = 0; r < NR; r++)
      check(solo[r] == 32'(ref_solo[r]), $sformatf("%s solo[%0d]=%0d exp %0d", tag, r, solo[r], ref_solo[r]));
    for (int k = 0; k < NPR; k++)
      check(pair[k] == 32'(ref_pair[k]), $sformatf("%s pair[%0d]=%0d exp %0d", tag, k, pair[k], ref_pair[k]));
  endtask

  task automatic clear_all();
    @(negedge clk);
    en = '0; clr = 1'b1;
    @(posedge clk);
    #1 clr = 1'b0;
    for (int r = 0; r < NR; r++) ref_solo[r] = 0;
    for (int k = 0; k < NPR; k++) ref_pair[k] = 0;
  endtask

  // Static greedy partitioning on the counted graph (registers 1..5).
  // cost = alpha*AVF + (1-alpha)*(solo + sum of edges to protected), alpha
  // in percent so that the arithmetic stays integer.
  task automatic static_greedy(input int alpha_pct, input int nprot,
                               output int order [3]);
    bit prot [5];
    int best, best_r;
    for (int a = 0; a < 5; a++) prot[a] = 0;
    // the register with the highest AVF is protected first
    best_r = 0;
    for (int a = 1; a < 5; a++) if (G_AVF[a] > G_AVF[best_r]) best_r = a;
    prot[best_r] = 1;
    order[0] = best_r + 1;
    for (int n = 1; n < nprot; n++) begin
      best = -1; best_r = -1;
      for (int a = 0; a < 5; a++) begin
        int xpow, cost;
        if (prot[a]) continue;
        xpow = 0;
        for (int b = 0; b < 5; b++)
          if (prot[b]) begin
            int i, j;
            i = (a < b) ? a + 1 : b + 1;
            j = (a < b) ? b + 1 : a + 1;
            xpow += int'(pair[pair_index(i, j, NR)]);
          end
        cost = alpha_pct * G_AVF[a] + (100 - alpha_pct) * (int'(solo[a + 1]) + xpow);
        if (cost > best) begin best = cost; best_r = a; end
      end
      prot[best_r] = 1;
      order[n] = best_r + 1;
    end
  endtask

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev_a [$], ev_b [$];
    int order [3];
    en = '0; clr = 1'b0; addr[0] = '0; addr[1] = '0;
    for (int r = 0; r < NR; r++) ref_solo[r] = 0;
    for (int k = 0; k < NPR; k++) ref_pair[k] = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- Part 1: the example graph
    for (int a = 0; a < 5; a++) begin
      for (int n = 0; n < G_SOLO[a]; n++) begin ev_a.push_back(a + 1); ev_b.push_back(0); end
      for (int b = a + 1; b < 5; b++)
        for (int n = 0; n < G_EDGE[a][b]; n++) begin ev_a.push_back(a + 1); ev_b.push_back(b + 1); end
    end
    // shuffle
    for (int i = ev_a.size() - 1; i > 0; i--) begin
      int j, ta, tb2;
      j = $urandom_range(0, i);
      ta = ev_a[i]; ev_a[i] = ev_a[j]; ev_a[j] = ta;
      tb2 = ev_b[i]; ev_b[i] = ev_b[j]; ev_b[j] = tb2;
    end
    for (int i = 0; i < ev_a.size(); i++) begin
      if (ev_b[i] == 0) begin
        // a solo access on a random port, sometimes on both ports at once
        case ($urandom_range(0, 2))
          0: drive(2'b01, ev_a[i], 0);
          1: drive(2'b10, 0, ev_a[i]);
          default: drive(2'b11, ev_a[i], ev_a[i]);
        endcase
      end else if ($urandom_range(0, 1) == 0) drive(2'b11, ev_a[i], ev_b[i]);
      else                                    drive(2'b11, ev_b[i], ev_a[i]);
    end
    idle_and_compare("graph");
    for (int a = 0; a < 5; a++) begin
      check(solo[a + 1] == 32'(G_SOLO[a]), $sformatf("node R%0d weight %0d", a + 1, solo[a + 1]));
      for (int b = a + 1; b < 5; b++)
        check(pair[pair_index(a + 1, b + 1, NR)] == 32'(G_EDGE[a][b]),
              $sformatf("edge R%0d-R%0d weight", a + 1, b + 1));
    end
    foreach (order[i]) order[i] = 0;
    static_greedy(0, 3, order);
    check(order[0] == 1 && order[1] == 3 && order[2] == 2,
          $sformatf("alpha 0: protected order R%0d R%0d R%0d, exp R1 R3 R2", order[0], order[1], order[2]));
    static_greedy(50, 3, order);
    check(order[0] == 1 && order[1] == 3 && order[2] == 2,
          $sformatf("alpha 0.5: protected order R%0d R%0d R%0d, exp R1 R3 R2", order[0], order[1], order[2]));

    // ---- Part 2: random traffic
    clear_all();
    idle_and_compare("after clear");
    for (int i = 0; i < 5000; i++) begin
      drive(2'($urandom_range(0, 3)), $urandom_range(0, NR - 1), $urandom_range(0, NR - 1));
      if (i % 500 == 499) idle_and_compare($sformatf("random %0d", i));
    end
    idle_and_compare("final");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
