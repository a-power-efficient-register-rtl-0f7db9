// tb_prf_top: end-to-end test of the partitioned register file at its
// default size (16 x 32-bit registers, 8-8 split, protected registers
// 0 4 5 6 7 8 9 11, two ports).
//
// A reference model holds the 16 architectural registers, the bank each one
// lives in, the time of each register's latest write and latest read, and
// the access-class counts. Random two-port traffic, shaped like a register
// file's load from a program (mostly reads, some writes, occasional
// same-register write pairs), is checked cycle by cycle: read data, which
// bank port each port enabled, and, every few cycles, all monitor and
// co-access profile outputs.
// Each mechanism of the design is counted and must occur at least once:
// protected-only, unprotected-only and cross-partition cycles, reads served
// by each bank, write conflicts, read-and-write of one register in a cycle,
// lifetimes closed with and without a read, single-register and
// two-register accesses of the co-access profile, and a monitor clear.
module tb_prf_top;
  import prf_pkg::*;

  localparam int unsigned NP = 2;
  localparam int unsigned NR = 16;
  localparam logic [NR-1:0] MASK = PROT_MASK_DEF;

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

  logic [NP-1:0] en, we, prot_en, unprot_en;
  logic [3:0]    addr  [NP];
  logic [31:0]   wdata [NP], rdata [NP];
  logic          mon_clr;
  acc_class_e    acc_class;
  logic [31:0]   cycles, cnt_prot, cnt_unpr, cnt_cross, ace_unprot, ace_total;
  logic [31:0]   ace [NR];
  localparam int unsigned NPR = npairs_of(NR);
  logic [31:0]   solo [NR];
  logic [31:0]   pair [NPR];

  prf_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .we(we), .addr(addr), .wdata(wdata),
    .rdata(rdata), .prot_en(prot_en), .unprot_en(unprot_en),
    .mon_clr(mon_clr), .acc_class(acc_class), .cycles(cycles),
    .cnt_prot(cnt_prot), .cnt_unpr(cnt_unpr), .cnt_cross(cnt_cross),
    .ace(ace), .ace_unprot(ace_unprot), .ace_total(ace_total),
    .solo(solo), .pair(pair));

  // reference model
  logic [31:0] regs [NR];
  longint t;
  longint def_t [NR], last_rd [NR], closed [NR];
  longint n_prot, n_unpr, n_cross;
  longint ref_solo [NR];
  longint ref_pair [NPR];

  // mechanism counters
  int m_prot, m_unpr, m_cross, m_rd_prot, m_rd_unpr, m_conflict, m_rw_same;
  int m_ace_close, m_unace_close, m_clear, m_solo, m_pair;

  function automatic longint exp_ace(int r);
    return closed[r] + ((last_rd[r] >= 0) ? (last_rd[r] - def_t[r]) : 0);
  endfunction

  task automatic model_clear();
    t = 0;
    n_prot = 0; n_unpr = 0; n_cross = 0;
    for (int r = 0; r < NR; r++) begin
      def_t[r] = 0; last_rd[r] = -1; closed[r] = 0; ref_solo[r] = 0;
    end
    for (int k = 0; k < NPR; k++) ref_pair[k] = 0;
  endtask

  task automatic step(input logic [NP-1:0] e, input logic [NP-1:0] w,
                      input int a0, input int a1,
                      input logic [31:0] d0, input logic [31:0] d1);
    bit tp, tu;
    int aa [2];
    @(negedge clk);
    en = e; we = w; addr[0] = 4'(a0); addr[1] = 4'(a1);
    wdata[0] = d0; wdata[1] = d1;
    aa[0] = a0; aa[1] = a1;
    tp = 0; tu = 0;
    #1;
    for (int p = 0; p < NP; p++) begin
      logic [31:0] exp_d;
      bit is_p;
      is_p = MASK[aa[p]];
      if (e[p]) begin
        if (is_p) tp = 1; else tu = 1;
      end
      exp_d = (e[p] && !w[p]) ? regs[aa[p]] : '0;
      check(rdata[p] == exp_d,
            $sformatf("t=%0d port %0d r%0d read %h exp %h", t, p, aa[p], rdata[p], exp_d));
      check(prot_en[p] == (e[p] && is_p) && unprot_en[p] == (e[p] && !is_p),
            $sformatf("t=%0d port %0d bank enables", t, p));
      if (e[p] && !w[p]) begin
        if (is_p) m_rd_prot++; else m_rd_unpr++;
      end
    end
    check(acc_class == acc_class_e'({tu, tp}), $sformatf("t=%0d class", t));
    if (e == 2'b11 && w == 2'b11 && a0 == a1) m_conflict++;
    if (e == 2'b11 && w[0] != w[1] && a0 == a1) m_rw_same++;
    @(posedge clk);
    begin
      logic [NR-1:0] u;
      u = '0;
      for (int p = 0; p < NP; p++) if (e[p]) u[aa[p]] = 1'b1;
      if ($countones(u) == 1) begin
        m_solo++;
        for (int r = 0; r < NR; r++) if (u[r]) ref_solo[r]++;
      end
      if ($countones(u) == 2) m_pair++;
      for (int i = 0; i < NR; i++)
        for (int j = i + 1; j < NR; j++)
          if (u[i] && u[j]) ref_pair[pair_index(i, j, NR)]++;
    end
    if (tp && tu) begin n_cross++; m_cross++; end
    else if (tp)  begin n_prot++;  m_prot++;  end
    else if (tu)  begin n_unpr++;  m_unpr++;  end
    for (int p = 0; p < NP; p++)
      if (e[p] && !w[p]) last_rd[aa[p]] = t;
    for (int p = NP - 1; p >= 0; p--)
      if (e[p] && w[p]) begin
        regs[aa[p]] = (p == 0) ? d0 : d1;
        if (last_rd[aa[p]] >= 0) begin
          closed[aa[p]] += last_rd[aa[p]] - def_t[aa[p]];
          m_ace_close++;
        end else if (def_t[aa[p]] != t) begin
          m_unace_close++;
        end
        def_t[aa[p]] = t;
        last_rd[aa[p]] = -1;
      end
    t++;
  endtask

  // Check all monitor outputs; the cycle this takes is an idle one.
  task automatic compare(input string tag);
    longint su, st;
    @(negedge clk);
    en = '0; we = '0;
    #1;
    su = 0; st = 0;
    for (int r = 0; r < NR; r++) begin
      check(ace[r] == 32'(exp_ace(r)),
            $sformatf("%s ace[%0d]=%0d exp %0d", tag, r, ace[r], exp_ace(r)));
      st += exp_ace(r);
      if (!MASK[r]) su += exp_ace(r);
    end
    check(ace_total == 32'(st) && ace_unprot == 32'(su),
          $sformatf("%s ace sums %0d/%0d exp %0d/%0d", tag, ace_total, ace_unprot, st, su));
    check(cycles == 32'(t), $sformatf("%s cycles %0d exp %0d", tag, cycles, t));
    check(cnt_prot == 32'(n_prot) && cnt_unpr == 32'(n_unpr) && cnt_cross == 32'(n_cross),
          $sformatf("%s counts %0d/%0d/%0d exp %0d/%0d/%0d", tag, cnt_prot, cnt_unpr,
                    cnt_cross, n_prot, n_unpr, n_cross));
    for (int r = 0; r < NR; r++)
      check(solo[r] == 32'(ref_solo[r]), $sformatf("%s solo[%0d]", tag, r));
    for (int k = 0; k < NPR; k++)
      check(pair[k] == 32'(ref_pair[k]), $sformatf("%s pair[%0d]", tag, k));
    @(posedge clk);
    t++;
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
    m_prot = 0; m_unpr = 0; m_cross = 0; m_rd_prot = 0; m_rd_unpr = 0;
    m_conflict = 0; m_rw_same = 0; m_ace_close = 0; m_unace_close = 0; m_clear = 0;
    m_solo = 0; m_pair = 0;
    for (int r = 0; r < NR; r++) regs[r] = '0;
    en = '0; we = '0; mon_clr = 1'b0;
    for (int p = 0; p < NP; p++) begin addr[p] = '0; wdata[p] = '0; end
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    mon_clr = 1'b1;
    @(posedge clk);
    #1 mon_clr = 1'b0;
    model_clear();

    // Fill every register through alternating ports.
    for (int r = 0; r < NR; r += 2)
      step(2'b11, 2'b11, r, r + 1, 32'h1000_0000 + 32'(r), 32'h1000_0000 + 32'(r + 1));
    // Read every register back, pairing a protected with an unprotected one.
    for (int r = 0; r < NR; r++)
      step(2'b11, 2'b00, r, NR - 1 - r, '0, '0);
    compare("fill");

    // Program-like random traffic.
    for (int i = 0; i < 20000; i++) begin
      logic [NP-1:0] e, w;
      int a0, a1;
      int kind;
      kind = $urandom_range(0, 99);
      a0 = $urandom_range(0, NR - 1);
      a1 = $urandom_range(0, NR - 1);
      if (kind < 55)      begin e = 2'b11; w = 2'b00; end      // two source reads
      else if (kind < 80) begin e = 2'b11; w = 2'b10; end      // read + write-back
      else if (kind < 88) begin e = 2'($urandom_range(1, 3)); w = 2'b00; end
      else if (kind < 93) begin e = 2'b11; w = 2'b11; end      // two writes
      else if (kind < 96) begin e = 2'b11; w = 2'b11; a1 = a0; end  // conflict
      else if (kind < 98) begin e = 2'b11; w = 2'b01; a1 = a0; end  // read + write same reg
      else                begin e = 2'b00; w = 2'b00; end
      step(e, w, a0, a1, $urandom(), $urandom());
      if (i % 100 == 99) compare($sformatf("random %0d", i));
      if (i == 10000) begin
        @(negedge clk);
        mon_clr = 1'b1; en = '0; we = '0;
        @(posedge clk);
        #1 mon_clr = 1'b0;
        model_clear();
        m_clear++;
        compare("after clear");
      end
    end
    compare("final");

    check(m_prot > 0,        "no protected-only cycle");
    check(m_unpr > 0,        "no unprotected-only cycle");
    check(m_cross > 0,       "no cross-partition cycle");
    check(m_rd_prot > 0,     "no read from the protected bank");
    check(m_rd_unpr > 0,     "no read from the unprotected bank");
    check(m_conflict > 0,    "no write conflict");
    check(m_rw_same > 0,     "no read and write of one register in a cycle");
    check(m_ace_close > 0,   "no lifetime closed after a read");
    check(m_unace_close > 0, "no value overwritten unread");
    check(m_clear > 0,       "no monitor clear");
    check(m_solo > 0,        "no single-register access");
    check(m_pair > 0,        "no two-register access");
    check(ace_unprot < ace_total, "hardened bank removes no ACE time");
    $display("cycles prot=%0d unprot=%0d cross=%0d; reads prot=%0d unprot=%0d",
             m_prot, m_unpr, m_cross, m_rd_prot, m_rd_unpr);
    $display("conflicts=%0d read+write same=%0d lifetimes ACE=%0d unACE=%0d clears=%0d",
             m_conflict, m_rw_same, m_ace_close, m_unace_close, m_clear);
    $display("single-register cycles=%0d two-register cycles=%0d", m_solo, m_pair);
    $display("since clear: ACE unprotected/total = %0d/%0d over %0d cycles",
             ace_unprot, ace_total, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
