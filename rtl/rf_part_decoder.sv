// rf_part_decoder: routes each port of the register file to its partition.
//
// The register file is split into a protected partition of PROT_SIZE
// registers and an unprotected partition holding the rest. Which
// architectural registers are protected is fixed when the processor is built
// (the partitioning is chosen offline, from a profile of the target program)
// and is given here by PROT_MASK, one bit per register. For every port the
// decoder looks up, in a table built at elaboration time from PROT_MASK, the
// partition of the addressed register and its row inside that partition
// (its rank among the registers of the same partition, in register order).
// It then raises the enable of only that partition's port, so the other
// partition's decoder, word lines and bit lines stay idle for that port.
//
// Interface, per port p: en and addr in architectural terms; out come
// prot_en/unprot_en (port enables of each bank, at most one of them high),
// the local rows prot_addr/unprot_addr, and sel_prot, which tells the
// read-data selector which bank answers. Write enables pass to the banks
// unchanged, since a bank port that is not enabled ignores them.
// Timing: purely combinational.
//
// Splitting the file into a protected and an unprotected partition by a
// register selection follows the source design; the mask parameter and the
// rank ordering inside each bank are choices of this implementation.
module rf_part_decoder #(
  parameter int unsigned NREGS     = prf_pkg::NREGS_DEF,
  parameter int unsigned PROT_SIZE = prf_pkg::PROT_SIZE_DEF,
  parameter logic [NREGS-1:0] PROT_MASK = prf_pkg::PROT_MASK_DEF,
  parameter int unsigned NPORTS    = prf_pkg::NPORTS_DEF,
  localparam int unsigned RAW = prf_pkg::aw_of(NREGS),
  localparam int unsigned PAW = prf_pkg::aw_of(PROT_SIZE),
  localparam int unsigned UAW = prf_pkg::aw_of(NREGS - PROT_SIZE)
) (
  input  logic [NPORTS-1:0] en,
  input  logic [RAW-1:0]    addr        [NPORTS],
  output logic [NPORTS-1:0] prot_en,
  output logic [NPORTS-1:0] unprot_en,
  output logic [NPORTS-1:0] sel_prot,
  output logic [PAW-1:0]    prot_addr   [NPORTS],
  output logic [UAW-1:0]    unprot_addr [NPORTS]
);

  typedef logic [RAW-1:0] rank_t;
  typedef rank_t rank_table_t [NREGS];

  // Row of each register inside its own partition.
  function automatic rank_table_t build_ranks(logic [NREGS-1:0] mask);
    rank_table_t t;
    int unsigned np, nu;
    np = 0;
    nu = 0;
    for (int r = 0; r < NREGS; r++) begin
      if (mask[r]) begin
        t[r] = rank_t'(np);
        np++;
      end else begin
        t[r] = rank_t'(nu);
        nu++;
      end
    end
    return t;
  endfunction

  localparam rank_table_t RANK = build_ranks(PROT_MASK);

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      sel_prot[p]    = PROT_MASK[addr[p]];
      prot_en[p]     = en[p] &&  sel_prot[p];
      unprot_en[p]   = en[p] && !sel_prot[p];
      prot_addr[p]   = PAW'(RANK[addr[p]]);
      unprot_addr[p] = UAW'(RANK[addr[p]]);
    end
  end

  // The mask must name exactly PROT_SIZE registers, and both partitions
  // must be non-empty.
  initial begin
    assert ($countones(PROT_MASK) == PROT_SIZE)
      else $error("rf_part_decoder: PROT_MASK has %0d registers, PROT_SIZE is %0d",
                  $countones(PROT_MASK), PROT_SIZE);
    assert (PROT_SIZE > 0 && PROT_SIZE < NREGS)
      else $error("rf_part_decoder: PROT_SIZE %0d out of range", PROT_SIZE);
  end

endmodule
