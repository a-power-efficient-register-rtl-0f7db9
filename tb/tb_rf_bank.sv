// tb_rf_bank: self-checking test of the two-port register bank.
//
// Two banks are tested side by side, one of 8 rows (the 8-8 split) and one of
// 14 rows (the large bank of a 2-14 split, not a power of two). Random
// operations on both ports are checked against a reference array: read data
// in the same cycle, zero on an idle or writing port, port 0 winning a
// same-row write, and reset clearing every row.
module tb_rf_bank;

  localparam int unsigned DW = 32;
  localparam int unsigned NP = 2;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_conflict = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- bank A: 8 rows
  logic [NP-1:0] en_a, we_a;
  logic [2:0]    addr_a [NP];
  logic [DW-1:0] wdata_a [NP], rdata_a [NP];
  logic [DW-1:0] ref_a [8];

  rf_bank #(.DEPTH(8), .DATA_W(DW), .NPORTS(NP)) dut_a (
    .clk(clk), .rst_n(rst_n), .en(en_a), .we(we_a),
    .addr(addr_a), .wdata(wdata_a), .rdata(rdata_a));

  // ---- bank B: 14 rows
  logic [NP-1:0] en_b, we_b;
  logic [3:0]    addr_b [NP];
  logic [DW-1:0] wdata_b [NP], rdata_b [NP];
  logic [DW-1:0] ref_b [14];

  rf_bank #(.DEPTH(14), .DATA_W(DW), .NPORTS(NP)) dut_b (
    .clk(clk), .rst_n(rst_n), .en(en_b), .we(we_b),
    .addr(addr_b), .wdata(wdata_b), .rdata(rdata_b));

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = '0; we_a = '0; en_b = '0; we_b = '0;
    for (int p = 0; p < NP; p++) begin
      addr_a[p] = '0; wdata_a[p] = '0; addr_b[p] = '0; wdata_b[p] = '0;
    end
    for (int r = 0; r < 8; r++)  ref_a[r] = '0;
    for (int r = 0; r < 14; r++) ref_b[r] = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // After reset every row reads zero.
    for (int r = 0; r < 14; r++) begin
      @(negedge clk);
      en_a = 2'b01; we_a = '0; addr_a[0] = 3'(r % 8);
      en_b = 2'b10; we_b = '0; addr_b[1] = 4'(r);
      #1;
      check(rdata_a[0] == '0, $sformatf("A row %0d not clear after reset", r % 8));
      check(rdata_b[1] == '0, $sformatf("B row %0d not clear after reset", r));
    end

    // Random traffic.
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        en_a[p] = ($urandom_range(0, 9) != 0);
        we_a[p] = $urandom_range(0, 1);
        addr_a[p] = 3'($urandom_range(0, 7));
        wdata_a[p] = $urandom();
        en_b[p] = ($urandom_range(0, 9) != 0);
        we_b[p] = $urandom_range(0, 1);
        addr_b[p] = 4'($urandom_range(0, 13));
        wdata_b[p] = $urandom();
      end
      // force some same-row write conflicts
      if (i % 7 == 0) begin
        en_a = 2'b11; we_a = 2'b11; addr_a[1] = addr_a[0];
        en_b = 2'b11; we_b = 2'b11; addr_b[1] = addr_b[0];
        n_conflict++;
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        logic [DW-1:0] ea, eb;
        ea = (en_a[p] && !we_a[p]) ? ref_a[addr_a[p]] : '0;
        eb = (en_b[p] && !we_b[p]) ? ref_b[addr_b[p]] : '0;
        check(rdata_a[p] == ea, $sformatf("A port %0d read %h exp %h", p, rdata_a[p], ea));
        check(rdata_b[p] == eb, $sformatf("B port %0d read %h exp %h", p, rdata_b[p], eb));
      end
      @(posedge clk);
      for (int p = NP - 1; p >= 0; p--) begin
        if (en_a[p] && we_a[p]) ref_a[addr_a[p]] = wdata_a[p];
        if (en_b[p] && we_b[p]) ref_b[addr_b[p]] = wdata_b[p];
      end
    end

    // Explicit conflict: port 0 must win.
    @(negedge clk);
    en_a = 2'b11; we_a = 2'b11; addr_a[0] = 3'd5; addr_a[1] = 3'd5;
    wdata_a[0] = 32'hAAAA_0000; wdata_a[1] = 32'h5555_1111;
    @(negedge clk);
    en_a = 2'b10; we_a = 2'b00; addr_a[1] = 3'd5;
    #1 check(rdata_a[1] == 32'hAAAA_0000, "port 0 does not win a write conflict");
    check(rdata_a[0] == '0, "idle port drives data");
    ref_a[5] = 32'hAAAA_0000;

    // Reset clears again.
    @(negedge clk);
    en_a = '0; en_b = '0;
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      en_a = 2'b01; we_a = '0; addr_a[0] = 3'(r);
      #1 check(rdata_a[0] == '0, $sformatf("A row %0d not cleared by second reset", r));
    end

    check(n_conflict > 0, "no write conflict exercised");
    $display("write conflicts exercised: %0d", n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
