// tb_prf_configs: the partitioned register file in every evaluated split.
//
// Eight register files run side by side on the same traffic: the 2-14 and
// 4-12 splits and the six distinct 8-8 register selections that the partition
// cost function produces as its reliability weight alpha goes from 0 to 1
// (alpha = 0, 0.1, 0.2, 0.4, 0.7 and 1; the other alpha values repeat one of
// these). The traffic is program-like: two-source reads and write-backs with
// a skewed register popularity, so that the registers differ in access rate
// and lifetime. For every split the testbench checks read data against one
// reference register model, the per-cycle bank enables, the access-class
// counters against the split's own classification, and the ACE totals, which
// do not depend on the split. It then prints each split's A1/A2/A12 counts
// and the share of ACE time left in the unprotected bank.
module tb_prf_configs;
  import prf_pkg::*;

  localparam int unsigned NP   = 2;
  localparam int unsigned NR   = 16;
  localparam int unsigned NCFG = 8;

  typedef logic [NR-1:0] mask_t;
  localparam int unsigned SIZE [NCFG] = '{2, 4, 8, 8, 8, 8, 8, 8};
  localparam mask_t MASK [NCFG] = '{
    16'h0011,   // 2-14: registers 0 4
    16'h0071,   // 4-12: registers 0 4 5 6
    16'h581F,   // alpha 0   : 0 1 2 3 4 11 12 14
    16'h381F,   // alpha 0.1 : 0 1 2 3 4 11 12 13
    16'h191F,   // alpha 0.2 : 0 1 2 3 4 8 11 12
    16'h1B53,   // alpha 0.4 : 0 1 4 6 8 9 11 12
    16'h1BD1,   // alpha 0.7 : 0 4 6 7 8 9 11 12
    16'h0BF1    // alpha 1   : 0 4 5 6 7 8 9 11
  };

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

  logic [NP-1:0] en, we;
  logic [3:0]    addr  [NP];
  logic [31:0]   wdata [NP];
  logic          mon_clr;

  logic [31:0]   rdata      [NCFG][NP];
  logic [NP-1:0] prot_en    [NCFG];
  logic [NP-1:0] unprot_en  [NCFG];
  acc_class_e    acc_class  [NCFG];
  logic [31:0]   cycles     [NCFG];
  logic [31:0]   cnt_prot   [NCFG];
  logic [31:0]   cnt_unpr   [NCFG];
  logic [31:0]   cnt_cross  [NCFG];
  logic [31:0]   ace        [NCFG][NR];
  logic [31:0]   ace_unprot [NCFG];
  logic [31:0]   ace_total  [NCFG];
  logic [31:0]   solo       [NCFG][NR];
  logic [31:0]   pair       [NCFG][npairs_of(NR)];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    prf_top #(.PROT_SIZE(SIZE[c]), .PROT_MASK(MASK[c])) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .we(we), .addr(addr), .wdata(wdata),
      .rdata(rdata[c]), .prot_en(prot_en[c]), .unprot_en(unprot_en[c]),
      .mon_clr(mon_clr), .acc_class(acc_class[c]), .cycles(cycles[c]),
      .cnt_prot(cnt_prot[c]), .cnt_unpr(cnt_unpr[c]), .cnt_cross(cnt_cross[c]),
      .ace(ace[c]), .ace_unprot(ace_unprot[c]), .ace_total(ace_total[c]),
      .solo(solo[c]), .pair(pair[c]));
  end

  // reference
  logic [31:0] regs [NR];
  longint t;
  longint def_t [NR], last_rd [NR], closed [NR];
  longint n_cls [NCFG][4];

  function automatic longint exp_ace(int r);
    return closed[r] + ((last_rd[r] >= 0) ? (last_rd[r] - def_t[r]) : 0);
  endfunction

  // Skewed register choice: low registers and 11/12 are hot.
  function automatic int pick_reg();
    int x;
    x = $urandom_range(0, 99);
    if (x < 40) return $urandom_range(0, 4);
    if (x < 60) return 11 + $urandom_range(0, 1);
    return $urandom_range(0, NR - 1);
  endfunction

  task automatic step(input logic [NP-1:0] e, input logic [NP-1:0] w,
                      input int a0, input int a1);
    int aa [2];
    logic [31:0] d [2];
    @(negedge clk);
    aa[0] = a0; aa[1] = a1;
    d[0] = $urandom(); d[1] = $urandom();
    en = e; we = w;
    for (int p = 0; p < NP; p++) begin addr[p] = 4'(aa[p]); wdata[p] = d[p]; end
    #1;
    for (int c = 0; c < NCFG; c++) begin
      bit tp, tu;
      tp = 0; tu = 0;
      for (int p = 0; p < NP; p++) begin
        logic [31:0] exp_d;
        exp_d = (e[p] && !w[p]) ? regs[aa[p]] : '0;
        check(rdata[c][p] == exp_d,
              $sformatf("cfg %0d t=%0d port %0d read %h exp %h", c, t, p, rdata[c][p], exp_d));
        check(prot_en[c][p] == (e[p] && MASK[c][aa[p]]) &&
              unprot_en[c][p] == (e[p] && !MASK[c][aa[p]]),
              $sformatf("cfg %0d t=%0d port %0d enables", c, t, p));
        if (e[p]) begin
          if (MASK[c][aa[p]]) tp = 1; else tu = 1;
        end
      end
      n_cls[c][{tu, tp}]++;
    end
    @(posedge clk);
    for (int p = 0; p < NP; p++)
      if (e[p] && !w[p]) last_rd[aa[p]] = t;
    for (int p = NP - 1; p >= 0; p--)
      if (e[p] && w[p]) begin
        regs[aa[p]] = d[p];
        if (last_rd[aa[p]] >= 0) closed[aa[p]] += last_rd[aa[p]] - def_t[aa[p]];
        def_t[aa[p]] = t;
        last_rd[aa[p]] = -1;
      end
    t++;
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) begin
      regs[r] = '0; def_t[r] = 0; last_rd[r] = -1; closed[r] = 0;
    end
    for (int c = 0; c < NCFG; c++) for (int k = 0; k < 4; k++) n_cls[c][k] = 0;
    t = 0;
    en = '0; we = '0; mon_clr = 1'b0;
    for (int p = 0; p < NP; p++) begin addr[p] = '0; wdata[p] = '0; end
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    mon_clr = 1'b1;
    @(posedge clk);
    #1 mon_clr = 1'b0;

    for (int i = 0; i < 30000; i++) begin
      int kind;
      kind = $urandom_range(0, 99);
      if (kind < 60)      step(2'b11, 2'b00, pick_reg(), pick_reg());
      else if (kind < 90) step(2'b11, 2'b10, pick_reg(), pick_reg());
      else if (kind < 97) step(2'b01, 2'b00, pick_reg(), 0);
      else                step(2'b00, 2'b00, 0, 0);
    end

    @(negedge clk);
    en = '0; we = '0;
    #1;
    for (int c = 0; c < NCFG; c++) begin
      longint su, st;
      su = 0; st = 0;
      for (int r = 0; r < NR; r++) begin
        st += exp_ace(r);
        if (!MASK[c][r]) su += exp_ace(r);
        check(ace[c][r] == 32'(exp_ace(r)), $sformatf("cfg %0d ace[%0d]", c, r));
      end
      check(cycles[c] == 32'(t), $sformatf("cfg %0d cycles", c));
      check(ace_total[c] == 32'(st) && ace_unprot[c] == 32'(su), $sformatf("cfg %0d ace sums", c));
      check(cnt_prot[c] == 32'(n_cls[c][1]) && cnt_unpr[c] == 32'(n_cls[c][2]) &&
            cnt_cross[c] == 32'(n_cls[c][3]), $sformatf("cfg %0d class counts", c));
      for (int r = 0; r < NR; r++)
        check(solo[c][r] == solo[0][r], $sformatf("cfg %0d solo[%0d] differs from cfg 0", c, r));
      check(n_cls[c][1] > 0 && n_cls[c][2] > 0 && n_cls[c][3] > 0,
            $sformatf("cfg %0d: an access class never occurred", c));
      $display("split %0d-%0d mask %h: A1=%0d A2=%0d A12=%0d, unprotected ACE share %0d/1000",
               SIZE[c], NR - SIZE[c], MASK[c], cnt_prot[c], cnt_unpr[c], cnt_cross[c],
               (ace_unprot[c] * 1000) / ace_total[c]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
