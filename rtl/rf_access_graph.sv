// rf_access_graph: register co-access profile for choosing the partition.
//
// The register selection of the partitioned register file is chosen offline
// from a profile that is a weighted graph over the registers: each node
// carries the number of accesses in which that register is used with no
// other register (its "unaccompanied" accesses), and each edge the number of
// times the two registers it joins are accessed together. A greedy
// partitioner uses the node weights as a register's own access power and the
// edge weights to the registers already placed as its cross-access power.
// This block collects that graph while a program runs.
//
// Every cycle, the set of registers addressed by the enabled ports (reads
// and writes alike) is formed. If it holds exactly one register, that
// register's solo counter is incremented; every pair of registers in the set
// increments that pair's counter. Both ports naming the same register count
// as one register.
//
// Interface: en/addr of the register file ports, clr to restart; solo[r] per
// register and pair[k] per unordered pair, k = prf_pkg::pair_index(i, j,
// NREGS) for i < j. Counters are registered (a cycle shows one clock later),
// CNT_W bits wide, and wrap.
//
// The node and edge weights are those of the source design's profile graph;
// gathering them in hardware and the per-cycle grouping of accesses are this
// implementation's choices.
module rf_access_graph #(
  parameter int unsigned NREGS  = prf_pkg::NREGS_DEF,
  parameter int unsigned NPORTS = prf_pkg::NPORTS_DEF,
  parameter int unsigned CNT_W  = prf_pkg::CNT_W_DEF,
  localparam int unsigned RAW    = prf_pkg::aw_of(NREGS),
  localparam int unsigned NPAIRS = prf_pkg::npairs_of(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [NPORTS-1:0] en,
  input  logic [RAW-1:0]    addr [NPORTS],
  output logic [CNT_W-1:0]  solo [NREGS],
  output logic [CNT_W-1:0]  pair [NPAIRS]
);

  logic [NREGS-1:0]  used;      // registers addressed this cycle
  logic              single;    // exactly one register addressed
  logic [NPAIRS-1:0] pair_hit;

  always_comb begin
    used = '0;
    for (int p = 0; p < NPORTS; p++)
      if (en[p]) used[addr[p]] = 1'b1;
    single = ($countones(used) == 1);
    pair_hit = '0;
    for (int i = 0; i < NREGS; i++)
      for (int j = i + 1; j < NREGS; j++)
        pair_hit[prf_pkg::pair_index(i, j, NREGS)] = used[i] && used[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++)  solo[r] <= '0;
      for (int k = 0; k < NPAIRS; k++) pair[k] <= '0;
    end else if (clr) begin
      for (int r = 0; r < NREGS; r++)  solo[r] <= '0;
      for (int k = 0; k < NPAIRS; k++) pair[k] <= '0;
    end else begin
      for (int r = 0; r < NREGS; r++)
        if (single && used[r]) solo[r] <= solo[r] + 1'b1;
      for (int k = 0; k < NPAIRS; k++)
        if (pair_hit[k]) pair[k] <= pair[k] + 1'b1;
    end
  end

endmodule
