// tb_rf_part_decoder: self-checking test of the partition decoder.
//
// Three decoders are checked exhaustively over register numbers, port
// enables and ports: the default 8-8 split (protected registers
// 0 4 5 6 7 8 9 11), a 4-12 split and a 2-14 split. Expected rows come from
// hand-written tables for the default split and from a counting model for
// the others; each split is also checked to be a one-to-one placement
// (every row of every bank used by exactly one register).
module tb_rf_part_decoder;

  localparam int unsigned NP = 2;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- DUT 0: default split
  logic [NP-1:0] en0, pe0, ue0, sp0;
  logic [3:0]    ad0 [NP];
  logic [2:0]    pa0 [NP], ua0 [NP];
  rf_part_decoder dut0 (.en(en0), .addr(ad0), .prot_en(pe0), .unprot_en(ue0),
                        .sel_prot(sp0), .prot_addr(pa0), .unprot_addr(ua0));

  // ---- DUT 1: 4-12 split, protected registers 1 3 8 14
  localparam logic [15:0] M1 = 16'b0100_0001_0000_1010;
  logic [NP-1:0] en1, pe1, ue1, sp1;
  logic [3:0]    ad1 [NP];
  logic [1:0]    pa1 [NP];
  logic [3:0]    ua1 [NP];
  rf_part_decoder #(.PROT_SIZE(4), .PROT_MASK(M1)) dut1 (
    .en(en1), .addr(ad1), .prot_en(pe1), .unprot_en(ue1),
    .sel_prot(sp1), .prot_addr(pa1), .unprot_addr(ua1));

  // ---- DUT 2: 2-14 split, protected registers 13 15
  localparam logic [15:0] M2 = 16'b1010_0000_0000_0000;
  logic [NP-1:0] en2, pe2, ue2, sp2;
  logic [3:0]    ad2 [NP];
  logic [0:0]    pa2 [NP];
  logic [3:0]    ua2 [NP];
  rf_part_decoder #(.PROT_SIZE(2), .PROT_MASK(M2)) dut2 (
    .en(en2), .addr(ad2), .prot_en(pe2), .unprot_en(ue2),
    .sel_prot(sp2), .prot_addr(pa2), .unprot_addr(ua2));

  // Default split: protected? and row, written out by hand.
  localparam bit          DEF_P   [16] = '{1,0,0,0, 1,1,1,1, 1,1,0,1, 0,0,0,0};
  localparam int unsigned DEF_ROW [16] = '{0,0,1,2, 1,2,3,4, 5,6,3,7, 4,5,6,7};

  // Counting model of the row of register r under mask m.
  function automatic int unsigned model_row(logic [15:0] m, int r);
    int unsigned n = 0;
    for (int j = 0; j < r; j++) if (m[j] == m[r]) n++;
    return n;
  endfunction

  int unsigned used_p [3][16];
  int unsigned used_u [3][16];

  initial begin
    // watchdog
    fork
      begin
        #100000;
        failures++;
        $display("FAIL watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none

    for (int d = 0; d < 3; d++)
      for (int i = 0; i < 16; i++) begin used_p[d][i] = 0; used_u[d][i] = 0; end

    for (int e = 0; e < 4; e++) begin
      for (int r0 = 0; r0 < 16; r0++) begin
        for (int r1 = 0; r1 < 16; r1++) begin
          int rr [2];
          rr[0] = r0; rr[1] = r1;
          en0 = 2'(e); en1 = 2'(e); en2 = 2'(e);
          ad0[0] = 4'(r0); ad0[1] = 4'(r1);
          ad1[0] = 4'(r0); ad1[1] = 4'(r1);
          ad2[0] = 4'(r0); ad2[1] = 4'(r1);
          #1;
          for (int p = 0; p < NP; p++) begin
            bit on;
            on = e[p];
            // default split
            check(sp0[p] == DEF_P[rr[p]], $sformatf("def sel r%0d", rr[p]));
            check(pe0[p] == (on && DEF_P[rr[p]]), $sformatf("def prot_en r%0d en%0d", rr[p], on));
            check(ue0[p] == (on && !DEF_P[rr[p]]), $sformatf("def unprot_en r%0d en%0d", rr[p], on));
            if (DEF_P[rr[p]]) check(pa0[p] == 3'(DEF_ROW[rr[p]]), $sformatf("def prot row r%0d", rr[p]));
            else              check(ua0[p] == 3'(DEF_ROW[rr[p]]), $sformatf("def unprot row r%0d", rr[p]));
            // 4-12
            check(pe1[p] == (on && M1[rr[p]]) && ue1[p] == (on && !M1[rr[p]]),
                  $sformatf("4-12 enables r%0d", rr[p]));
            if (M1[rr[p]]) check(pa1[p] == 2'(model_row(M1, rr[p])), $sformatf("4-12 prot row r%0d", rr[p]));
            else           check(ua1[p] == 4'(model_row(M1, rr[p])), $sformatf("4-12 unprot row r%0d", rr[p]));
            // 2-14
            check(pe2[p] == (on && M2[rr[p]]) && ue2[p] == (on && !M2[rr[p]]),
                  $sformatf("2-14 enables r%0d", rr[p]));
            if (M2[rr[p]]) check(pa2[p] == 1'(model_row(M2, rr[p])), $sformatf("2-14 prot row r%0d", rr[p]));
            else           check(ua2[p] == 4'(model_row(M2, rr[p])), $sformatf("2-14 unprot row r%0d", rr[p]));
          end
          // record placements once (port 0, both ports enabled, r1 == 0)
          if (e == 3 && r1 == 0) begin
            if (sp0[0]) used_p[0][pa0[0]]++; else used_u[0][ua0[0]]++;
            if (sp1[0]) used_p[1][pa1[0]]++; else used_u[1][ua1[0]]++;
            if (sp2[0]) used_p[2][pa2[0]]++; else used_u[2][ua2[0]]++;
          end
        end
      end
    end

    // one-to-one placement
    for (int i = 0; i < 16; i++) begin
      check(used_p[0][i] == ((i < 8)  ? 1 : 0), $sformatf("def prot row %0d use %0d", i, used_p[0][i]));
      check(used_u[0][i] == ((i < 8)  ? 1 : 0), $sformatf("def unprot row %0d use %0d", i, used_u[0][i]));
      check(used_p[1][i] == ((i < 4)  ? 1 : 0), $sformatf("4-12 prot row %0d use %0d", i, used_p[1][i]));
      check(used_u[1][i] == ((i < 12) ? 1 : 0), $sformatf("4-12 unprot row %0d use %0d", i, used_u[1][i]));
      check(used_p[2][i] == ((i < 2)  ? 1 : 0), $sformatf("2-14 prot row %0d use %0d", i, used_p[2][i]));
      check(used_u[2][i] == ((i < 14) ? 1 : 0), $sformatf("2-14 unprot row %0d use %0d", i, used_u[2][i]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
