// prf_top: a two-partition register file with a hardened (protected) bank.
//
// The 16 architectural registers are split into two banks. The protected
// bank (PROT_SIZE registers) is built from radiation-hardened cells, so a
// particle strike cannot flip its bits; the unprotected bank holds the rest in
// ordinary cells. Registers are placed by PROT_MASK so that those with the
// longest live intervals (highest AVF) and, depending on the chosen weighting,
// the most frequent accesses sit in the protected bank. Because each bank is
// smaller than a monolithic file, its bit lines are shorter and an access
// costs less energy; the hardened cells cost extra energy only on the
// protected bank. Together this lowers both vulnerability and access energy.
//
// Structure: rf_part_decoder maps each port's register number to a bank and a
// row and enables only that bank's port; two rf_bank instances hold the data;
// a per-port selector returns the data of the bank that was addressed;
// rf_access_monitor counts accesses per partition class and ACE time per
// register; rf_access_graph collects the register co-access profile
// (accesses of one register alone, and of each pair together) from which the
// next register selection can be computed. In hardware the protected bank differs from the other only in its
// cell, which has no logic-level effect, so both are the same rf_bank module.
//
// Interface: NPORTS ports, each with en, we, addr (register number), wdata and
// rdata; prot_en/unprot_en show which bank port each port drove this cycle;
// mon_clr and the monitor outputs (see rf_access_monitor and
// rf_access_graph).
// Timing: reads combinational, writes at the rising clock edge, port 0 wins a
// same-register write conflict, asynchronous active-low reset clears all
// registers and counters.
//
// The 16 registers, the protected/unprotected split, the 8-8 default and the
// default register selection follow the source design; data width, port
// behaviour and timing are this implementation's choices.
module prf_top
  import prf_pkg::*;
#(
  parameter int unsigned NREGS     = prf_pkg::NREGS_DEF,
  parameter int unsigned PROT_SIZE = prf_pkg::PROT_SIZE_DEF,
  parameter logic [NREGS-1:0] PROT_MASK = prf_pkg::PROT_MASK_DEF,
  parameter int unsigned DATA_W    = prf_pkg::DATA_W_DEF,
  parameter int unsigned NPORTS    = prf_pkg::NPORTS_DEF,
  parameter int unsigned CNT_W     = prf_pkg::CNT_W_DEF,
  localparam int unsigned RAW    = prf_pkg::aw_of(NREGS),
  localparam int unsigned NPAIRS = prf_pkg::npairs_of(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // register file ports
  input  logic [NPORTS-1:0] en,
  input  logic [NPORTS-1:0] we,
  input  logic [RAW-1:0]    addr  [NPORTS],
  input  logic [DATA_W-1:0] wdata [NPORTS],
  output logic [DATA_W-1:0] rdata [NPORTS],
  // bank activity
  output logic [NPORTS-1:0] prot_en,
  output logic [NPORTS-1:0] unprot_en,
  // access and vulnerability monitor
  input  logic              mon_clr,
  output acc_class_e        acc_class,
  output logic [CNT_W-1:0]  cycles,
  output logic [CNT_W-1:0]  cnt_prot,
  output logic [CNT_W-1:0]  cnt_unpr,
  output logic [CNT_W-1:0]  cnt_cross,
  output logic [CNT_W-1:0]  ace [NREGS],
  output logic [CNT_W-1:0]  ace_unprot,
  output logic [CNT_W-1:0]  ace_total,
  // co-access profile (cleared by mon_clr as well)
  output logic [CNT_W-1:0]  solo [NREGS],
  output logic [CNT_W-1:0]  pair [NPAIRS]
);

  localparam int unsigned UNPROT_SIZE = NREGS - PROT_SIZE;
  localparam int unsigned PAW = prf_pkg::aw_of(PROT_SIZE);
  localparam int unsigned UAW = prf_pkg::aw_of(UNPROT_SIZE);

  logic [NPORTS-1:0] sel_prot;
  logic [PAW-1:0]    prot_addr    [NPORTS];
  logic [UAW-1:0]    unprot_addr  [NPORTS];
  logic [DATA_W-1:0] prot_rdata   [NPORTS];
  logic [DATA_W-1:0] unprot_rdata [NPORTS];

  rf_part_decoder #(
    .NREGS     (NREGS),
    .PROT_SIZE (PROT_SIZE),
    .PROT_MASK (PROT_MASK),
    .NPORTS    (NPORTS)
  ) u_decoder (
    .en          (en),
    .addr        (addr),
    .prot_en     (prot_en),
    .unprot_en   (unprot_en),
    .sel_prot    (sel_prot),
    .prot_addr   (prot_addr),
    .unprot_addr (unprot_addr)
  );

  // Protected partition: hardened cells.
  rf_bank #(
    .DEPTH  (PROT_SIZE),
    .DATA_W (DATA_W),
    .NPORTS (NPORTS)
  ) u_prot_bank (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (prot_en),
    .we    (we),
    .addr  (prot_addr),
    .wdata (wdata),
    .rdata (prot_rdata)
  );

  // Unprotected partition: ordinary cells.
  rf_bank #(
    .DEPTH  (UNPROT_SIZE),
    .DATA_W (DATA_W),
    .NPORTS (NPORTS)
  ) u_unprot_bank (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (unprot_en),
    .we    (we),
    .addr  (unprot_addr),
    .wdata (wdata),
    .rdata (unprot_rdata)
  );

  // Read-data selection: each port takes the bank it addressed.
  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      rdata[p] = sel_prot[p] ? prot_rdata[p] : unprot_rdata[p];
  end

  rf_access_monitor #(
    .NREGS     (NREGS),
    .PROT_MASK (PROT_MASK),
    .NPORTS    (NPORTS),
    .CNT_W     (CNT_W)
  ) u_monitor (
    .clk        (clk),
    .rst_n      (rst_n),
    .clr        (mon_clr),
    .en         (en),
    .we         (we),
    .addr       (addr),
    .acc_class  (acc_class),
    .cycles     (cycles),
    .cnt_prot   (cnt_prot),
    .cnt_unpr   (cnt_unpr),
    .cnt_cross  (cnt_cross),
    .ace        (ace),
    .ace_unprot (ace_unprot),
    .ace_total  (ace_total)
  );

  rf_access_graph #(
    .NREGS  (NREGS),
    .NPORTS (NPORTS),
    .CNT_W  (CNT_W)
  ) u_graph (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (mon_clr),
    .en    (en),
    .addr  (addr),
    .solo  (solo),
    .pair  (pair)
  );

endmodule
