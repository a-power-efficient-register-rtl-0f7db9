// tb_rf_access_monitor: self-checking test of the access and ACE monitor.
//
// The testbench keeps, for every register, the time of its latest write and
// of the latest read since then; when the register is written again the
// finished lifetime (write to last read, zero if it was never read) is added
// to its expected ACE total. Cycles are classed from the port activity and the
// default register split. Both are compared with the monitor after every
// cycle. A directed part first replays the two textbook cases: a write
// followed by several reads (ACE ends at the last read) and a write
// overwritten without a read (no ACE).
module tb_rf_access_monitor;
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

  logic          clr;
  logic [NP-1:0] en, we;
  logic [3:0]    addr [NP];
  acc_class_e    acc_class;
  logic [31:0]   cycles, cnt_prot, cnt_unpr, cnt_cross, ace_unprot, ace_total;
  logic [31:0]   ace [NR];

  rf_access_monitor dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .we(we), .addr(addr),
    .acc_class(acc_class), .cycles(cycles), .cnt_prot(cnt_prot),
    .cnt_unpr(cnt_unpr), .cnt_cross(cnt_cross), .ace(ace),
    .ace_unprot(ace_unprot), .ace_total(ace_total));

  // reference state
  longint t;                    // index of the cycle being driven
  longint def_t   [NR];         // time of the current value's write
  longint last_rd [NR];         // latest read of the current value, -1 none
  longint closed  [NR];         // finished lifetimes
  longint n_prot, n_unpr, n_cross;
  int     n_ace_close, n_unace_close;

  function automatic longint exp_ace(int r);
    return closed[r] + ((last_rd[r] >= 0) ? (last_rd[r] - def_t[r]) : 0);
  endfunction

  task automatic model_clear();
    t = 0;
    n_prot = 0; n_unpr = 0; n_cross = 0;
    for (int r = 0; r < NR; r++) begin
      def_t[r] = 0; last_rd[r] = -1; closed[r] = 0;
    end
  endtask

  // Apply one cycle: drive at negedge, check class, update model at posedge.
  task automatic step(input logic [NP-1:0] e, input logic [NP-1:0] w,
                      input int a0, input int a1);
    bit tp, tu;
    int aa [2];
    @(negedge clk);
    en = e; we = w; addr[0] = 4'(a0); addr[1] = 4'(a1);
    aa[0] = a0; aa[1] = a1;
    tp = 0; tu = 0;
    for (int p = 0; p < NP; p++)
      if (e[p]) begin
        if (MASK[aa[p]]) tp = 1; else tu = 1;
      end
    #1;
    check(acc_class == acc_class_e'({tu, tp}), $sformatf("class at t=%0d", t));
    @(posedge clk);
    if (tp && tu) n_cross++;
    else if (tp)  n_prot++;
    else if (tu)  n_unpr++;
    // reads see the old value: handle them before the writes
    for (int p = 0; p < NP; p++)
      if (e[p] && !w[p]) last_rd[aa[p]] = t;
    for (int p = 0; p < NP; p++)
      if (e[p] && w[p]) begin
        if (last_rd[aa[p]] >= 0) begin
          closed[aa[p]] += last_rd[aa[p]] - def_t[aa[p]];
          n_ace_close++;
        end else begin
          n_unace_close++;
        end
        def_t[aa[p]] = t;
        last_rd[aa[p]] = -1;
      end
    t++;
  endtask

  // Check all outputs; the cycle this takes is an idle one.
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
    check(ace_total == 32'(st), $sformatf("%s ace_total %0d exp %0d", tag, ace_total, st));
    check(ace_unprot == 32'(su), $sformatf("%s ace_unprot %0d exp %0d", tag, ace_unprot, su));
    check(cycles == 32'(t), $sformatf("%s cycles %0d exp %0d", tag, cycles, t));
    check(cnt_prot == 32'(n_prot) && cnt_unpr == 32'(n_unpr) && cnt_cross == 32'(n_cross),
          $sformatf("%s counts %0d/%0d/%0d exp %0d/%0d/%0d", tag, cnt_prot, cnt_unpr,
                    cnt_cross, n_prot, n_unpr, n_cross));
    @(posedge clk);
    t++;
  endtask

  // watchdog
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_ace_close = 0; n_unace_close = 0;
    en = '0; we = '0; addr[0] = '0; addr[1] = '0; clr = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // a clear pulse aligns the model's cycle 0 with the monitor's
    clr = 1'b1;
    @(posedge clk);
    #1 clr = 1'b0;
    model_clear();

    // Directed: r3 written at t=0, read at t=3 and t=7, rewritten at t=12
    // -> ACE 7. r10 written at t=1 and again at t=9 with no read -> ACE 0.
    for (int i = 0; i < 14; i++) begin
      case (i)
        0:  step(2'b01, 2'b01, 3, 0);
        1:  step(2'b10, 2'b10, 0, 10);
        3:  step(2'b01, 2'b00, 3, 0);
        7:  step(2'b10, 2'b00, 0, 3);
        9:  step(2'b10, 2'b10, 0, 10);
        12: step(2'b01, 2'b01, 3, 0);
        default: step(2'b00, 2'b00, 0, 0);
      endcase
    end
    compare("directed");
    check(ace[3] == 32'd7, $sformatf("fig3 case: ace[3]=%0d exp 7", ace[3]));
    check(ace[10] == 32'd0, $sformatf("fig4 case: ace[10]=%0d exp 0", ace[10]));

    // Random traffic, with a mid-run clear.
    for (int i = 0; i < 6000; i++) begin
      logic [NP-1:0] e, w;
      e = 2'($urandom_range(0, 3));
      w = '0;
      for (int p = 0; p < NP; p++) w[p] = ($urandom_range(0, 3) == 0);
      step(e, w, $urandom_range(0, NR - 1), $urandom_range(0, NR - 1));
      if (i % 50 == 49) compare($sformatf("random %0d", i));
      if (i == 3000) begin
        @(negedge clk);
        clr = 1'b1; en = '0; we = '0;
        @(posedge clk);
        #1 clr = 1'b0;
        model_clear();
        compare("after clear");
      end
    end
    compare("final");

    check(n_prot > 0 && n_unpr > 0 && n_cross > 0, "not every access class seen");
    check(n_ace_close > 0 && n_unace_close > 0, "not every lifetime kind seen");
    $display("classes prot=%0d unprot=%0d cross=%0d, lifetimes ACE=%0d unACE=%0d",
             n_prot, n_unpr, n_cross, n_ace_close, n_unace_close);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
