// rf_bank: one partition of the register file, a two-port register bank.
//
// The bank follows the classic register-file organisation: an address decoder
// turns each port's index into a one-hot word line, the word line selects a row
// of the array, and the read path (the sense amplifier in a full-custom array)
// ORs the selected row onto the port's read bus. Each port has its own word
// lines and bit lines, so the two ports work independently in the same cycle.
// A port whose enable is low raises no word line and drives zero on its read
// bus: a bank that no port addresses does no work, which is where the energy
// saving of a partitioned register file comes from.
//
// Interface, per port p: en[p] selects the port, we[p] makes it a write,
// addr[p] is the local row and wdata[p] the data to write; rdata[p] is the
// read data.
// Timing: reads are combinational (the row addressed in this cycle appears on
// rdata in the same cycle, before any write of this cycle); writes take effect
// at the rising clock edge. If both ports write the same row in one cycle,
// port 0 wins. A row index at or above DEPTH selects nothing.
// Reset (asynchronous, active low) clears every row.
//
// The decoder/array/read-path structure and the two ports follow the source
// design; the combinational read, the write priority and the reset are choices
// of this implementation.
module rf_bank #(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NPORTS = 2,
  localparam int unsigned AW    = prf_pkg::aw_of(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] en,
  input  logic [NPORTS-1:0] we,
  input  logic [AW-1:0]     addr  [NPORTS],
  input  logic [DATA_W-1:0] wdata [NPORTS],
  output logic [DATA_W-1:0] rdata [NPORTS]
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]  wl  [NPORTS];   // decoded word lines, one-hot per port

  // Address decoder: one word line per port and row.
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      wl[p] = '0;
      for (int r = 0; r < DEPTH; r++)
        wl[p][r] = en[p] && (int'(addr[p]) == r);
    end
  end

  // Write drivers. Ports are applied from the highest to port 0, so port 0
  // takes a row that several ports write.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < DEPTH; r++) mem[r] <= '0;
    end else begin
      for (int r = 0; r < DEPTH; r++)
        for (int p = NPORTS - 1; p >= 0; p--)
          if (wl[p][r] && we[p]) mem[r] <= wdata[p];
    end
  end

  // Read path: the selected row is ORed onto the port's bus.
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      rdata[p] = '0;
      for (int r = 0; r < DEPTH; r++)
        if (wl[p][r] && !we[p]) rdata[p] = rdata[p] | mem[r];
    end
  end

  // An enabled port must address an existing row.
  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++)
      if (rst_n && en[p])
        assert (int'(addr[p]) < DEPTH)
          else $error("rf_bank: port %0d addresses row %0d of %0d", p, addr[p], DEPTH);
  end

endmodule
