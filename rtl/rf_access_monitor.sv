// rf_access_monitor: access and vulnerability counters of the register file.
//
// Two figures decide how good a partitioning is, and this block measures both
// while the register file runs.
//
// Energy: a two-partition register file spends P1 per access that touches
// only partition 1, P2 per access that touches only partition 2, and P12 per
// access that touches both, so its access energy is
// P1*A1 + P2*A2 + P12*A12. Every cycle in which some port is enabled is
// classed by the partitions its ports touch (protected only, unprotected
// only, or both) and counted in cnt_prot (A1), cnt_unpr (A2) or cnt_cross
// (A12).
//
// Vulnerability: a register is in its ACE time (architecturally correct
// execution: a bit flip there becomes an error) from a write until the last
// read before the next write; the stretch from that last read to the next
// write, and an interval with no read at all, are un-ACE. Each register has an
// open-interval counter that runs from the latest write or read; a read adds
// the open interval to the register's ACE total and restarts it, a write only
// restarts it. So the reads between two writes add up exactly to "write until
// last read", and an overwritten value that was never read adds nothing. The
// register's AVF is ace[r] / cycles. ace_unprot sums the unprotected
// registers (those whose hardened cells do not cover them) and ace_total all
// registers, so 1 - ace_unprot/ace_total is the AVF reduction of the split.
// A read and a write of the same register in one cycle read the old value:
// the read closes the old interval, the write opens the new one. Reset and
// clr count as writes of every register.
//
// Interface: the same en/we/addr the register file sees (architectural
// register numbers), clr to restart all counters. The counter outputs are
// registered, so a cycle's accesses show in them one clock later; acc_class
// is combinational and describes the current cycle.
//
// The energy model's three access classes and the ACE/un-ACE definition
// follow the source design; measuring them on-line, per cycle, is this
// implementation's choice (the source obtained them from simulation traces).
module rf_access_monitor
  import prf_pkg::*;
#(
  parameter int unsigned NREGS     = prf_pkg::NREGS_DEF,
  parameter logic [NREGS-1:0] PROT_MASK = prf_pkg::PROT_MASK_DEF,
  parameter int unsigned NPORTS    = prf_pkg::NPORTS_DEF,
  parameter int unsigned CNT_W     = prf_pkg::CNT_W_DEF,
  localparam int unsigned RAW = prf_pkg::aw_of(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [NPORTS-1:0] en,
  input  logic [NPORTS-1:0] we,
  input  logic [RAW-1:0]    addr [NPORTS],
  output acc_class_e        acc_class,      // class of the current cycle
  output logic [CNT_W-1:0]  cycles,
  output logic [CNT_W-1:0]  cnt_prot,
  output logic [CNT_W-1:0]  cnt_unpr,
  output logic [CNT_W-1:0]  cnt_cross,
  output logic [CNT_W-1:0]  ace [NREGS],
  output logic [CNT_W-1:0]  ace_unprot,
  output logic [CNT_W-1:0]  ace_total
);

  logic             touch_prot, touch_unpr;
  logic [NREGS-1:0] rd_hit, wr_hit;
  logic [CNT_W-1:0] open_cnt [NREGS];

  // Classify the cycle and find the registers read and written in it.
  always_comb begin
    touch_prot = 1'b0;
    touch_unpr = 1'b0;
    rd_hit     = '0;
    wr_hit     = '0;
    for (int p = 0; p < NPORTS; p++) begin
      if (en[p]) begin
        if (PROT_MASK[addr[p]]) touch_prot = 1'b1;
        else                    touch_unpr = 1'b1;
        if (we[p]) wr_hit[addr[p]] = 1'b1;
        else       rd_hit[addr[p]] = 1'b1;
      end
    end
    acc_class = acc_class_e'({touch_unpr, touch_prot});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles    <= '0;
      cnt_prot  <= '0;
      cnt_unpr  <= '0;
      cnt_cross <= '0;
      for (int r = 0; r < NREGS; r++) begin
        ace[r]      <= '0;
        open_cnt[r] <= '0;
      end
    end else if (clr) begin
      cycles    <= '0;
      cnt_prot  <= '0;
      cnt_unpr  <= '0;
      cnt_cross <= '0;
      for (int r = 0; r < NREGS; r++) begin
        ace[r]      <= '0;
        open_cnt[r] <= '0;
      end
    end else begin
      cycles <= cycles + 1'b1;
      unique case (acc_class)
        ACC_PROT:  cnt_prot  <= cnt_prot  + 1'b1;
        ACC_UNPR:  cnt_unpr  <= cnt_unpr  + 1'b1;
        ACC_CROSS: cnt_cross <= cnt_cross + 1'b1;
        default:   ;
      endcase
      for (int r = 0; r < NREGS; r++) begin
        if (rd_hit[r]) ace[r] <= ace[r] + open_cnt[r];
        if (rd_hit[r] || wr_hit[r]) open_cnt[r] <= CNT_W'(1);
        else                        open_cnt[r] <= open_cnt[r] + 1'b1;
      end
    end
  end

  // Region sums of the ACE totals.
  always_comb begin
    ace_unprot = '0;
    ace_total  = '0;
    for (int r = 0; r < NREGS; r++) begin
      ace_total = ace_total + ace[r];
      if (!PROT_MASK[r]) ace_unprot = ace_unprot + ace[r];
    end
  end

endmodule
