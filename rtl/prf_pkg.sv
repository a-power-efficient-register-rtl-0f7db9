// prf_pkg: constants and types shared by the partitioned register file.
//
// The register file holds the 16 architectural registers of a small embedded
// core and splits them into two partitions: a protected one built from
// hardened cells and an unprotected one built from ordinary cells. The default
// split is 8-8, with registers 0 4 5 6 7 8 9 11 in the protected partition,
// the selection that a reliability-only weighting (alpha = 1) of the partition
// cost function produces for a string-search workload. The 16-register count
// and the 2/14, 4/12 and 8/8 splits follow the source design; the 32-bit word
// and two ports follow an ARM-class core with a two-port register file.
package prf_pkg;

  // Architectural register count and its address width.
  localparam int unsigned NREGS_DEF     = 16;
  // Registers in the protected partition for the main 8-8 split.
  localparam int unsigned PROT_SIZE_DEF = 8;
  // One bit per architectural register: 1 = protected partition.
  // Registers 0 4 5 6 7 8 9 11.
  localparam logic [NREGS_DEF-1:0] PROT_MASK_DEF = 16'h0BF1;
  // Word width of one register.
  localparam int unsigned DATA_W_DEF    = 32;
  // Ports of the two-port register file.
  localparam int unsigned NPORTS_DEF    = 2;
  // Width of the monitor's event and time counters.
  localparam int unsigned CNT_W_DEF     = 32;

  // Which partitions one cycle's accesses touched (A1, A2, A12 of the
  // two-partition access-energy model).
  typedef enum logic [1:0] {
    ACC_IDLE  = 2'd0,  // no port active
    ACC_PROT  = 2'd1,  // protected partition only (A1)
    ACC_UNPR  = 2'd2,  // unprotected partition only (A2)
    ACC_CROSS = 2'd3   // both partitions in the same cycle (A12)
  } acc_class_e;

  // Number of unordered register pairs among n registers.
  function automatic int unsigned npairs_of(int unsigned n);
    return (n * (n - 1)) / 2;
  endfunction

  // Index of the pair (i, j), i < j, among n registers: pairs are numbered
  // (0,1), (0,2) .. (0,n-1), (1,2) .. (n-2,n-1).
  function automatic int unsigned pair_index(int unsigned i, int unsigned j,
                                             int unsigned n);
    return i * n - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

  // Address width of a bank with n entries (at least one bit).
  function automatic int unsigned aw_of(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
