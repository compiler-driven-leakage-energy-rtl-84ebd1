// banked_rf: shared multi-ported register file split into power-managed banks.
//
// NUM_REGS registers of DATA_W bits, NRD read and NWR write ports, cut into
// NUM_BANKS banks of NUM_REGS/NUM_BANKS consecutive registers. Register r is
// word r % BANK_DEPTH of bank r / BANK_DEPTH. Each port's address is decoded
// into a bank and a word; the port's enable is raised only at the bank it
// addresses, so only that bank sees the access. The read data of a port is the
// OR of all banks' outputs for that port (a bank that is not addressed drives
// zeros), which is a one-hot multiplexer.
//
// The power state of every bank comes in on bank_on (from bank_power_ctrl).
// A bank in the low-power state ignores writes and returns zeros; an access to
// it is reported on sleep_access[bank]. Under the intended use the compiler has
// powered every bank a basic block uses before the block starts, so
// sleep_access never rises and banking costs no cycles.
//
// Timing: combinational read (same cycle), write at the rising edge,
// read-during-write returns the old value; rst_n (synchronous, active low)
// clears every register. bank_used[b] is high in a cycle in which any port
// addresses bank b.
//
// Banks of consecutive registers, reached by every port, with a per-bank
// low-power state follow the architecture; the address-to-bank mapping and
// the handling of accesses to a sleeping bank are this design's choices.
module banked_rf #(
  parameter int unsigned NUM_REGS  = rf_pkg::NUM_REGS,
  parameter int unsigned NUM_BANKS = rf_pkg::NUM_BANKS,
  parameter int unsigned DATA_W    = rf_pkg::DATA_W,
  parameter int unsigned NRD       = rf_pkg::NUM_RD,
  parameter int unsigned NWR       = rf_pkg::NUM_WR,
  localparam int unsigned AW         = $clog2(NUM_REGS),
  localparam int unsigned BANK_DEPTH = NUM_REGS / NUM_BANKS,
  localparam int unsigned IW         = (BANK_DEPTH > 1) ? $clog2(BANK_DEPTH) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NUM_BANKS-1:0]        bank_on,
  input  logic [NRD-1:0]              rd_en,
  input  logic [NRD-1:0][AW-1:0]      rd_addr,
  output logic [NRD-1:0][DATA_W-1:0]  rd_data,
  input  logic [NWR-1:0]              wr_en,
  input  logic [NWR-1:0][AW-1:0]      wr_addr,
  input  logic [NWR-1:0][DATA_W-1:0]  wr_data,
  output logic [NUM_BANKS-1:0]        bank_used,
  output logic [NUM_BANKS-1:0]        sleep_access
);
  // Per-port word index inside its bank (the same for every bank).
  logic [NRD-1:0][IW-1:0] rd_idx;
  logic [NWR-1:0][IW-1:0] wr_idx;
  // Per-bank port enables after the bank decode.
  logic [NUM_BANKS-1:0][NRD-1:0] bank_rd_en;
  logic [NUM_BANKS-1:0][NWR-1:0] bank_wr_en;
  logic [NUM_BANKS-1:0][NRD-1:0][DATA_W-1:0] bank_rd_data;

  always_comb begin
    for (int p = 0; p < NRD; p++) rd_idx[p] = IW'(rd_addr[p] % BANK_DEPTH);
    for (int p = 0; p < NWR; p++) wr_idx[p] = IW'(wr_addr[p] % BANK_DEPTH);
    for (int b = 0; b < NUM_BANKS; b++) begin
      for (int p = 0; p < NRD; p++)
        bank_rd_en[b][p] = rd_en[p] && (32'(rd_addr[p]) / BANK_DEPTH == b);
      for (int p = 0; p < NWR; p++)
        bank_wr_en[b][p] = wr_en[p] && (32'(wr_addr[p]) / BANK_DEPTH == b);
      bank_used[b] = (|bank_rd_en[b]) || (|bank_wr_en[b]);
    end
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    rf_bank #(
      .DEPTH (BANK_DEPTH),
      .DATA_W(DATA_W),
      .NRD   (NRD),
      .NWR   (NWR)
    ) u_bank (
      .clk         (clk),
      .rst_n       (rst_n),
      .active      (bank_on[b]),
      .rd_en       (bank_rd_en[b]),
      .rd_idx      (rd_idx),
      .rd_data     (bank_rd_data[b]),
      .wr_en       (bank_wr_en[b]),
      .wr_idx      (wr_idx),
      .wr_data     (wr_data),
      .sleep_access(sleep_access[b])
    );
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd_data[p] = '0;
      for (int b = 0; b < NUM_BANKS; b++) rd_data[p] |= bank_rd_data[b][p];
    end
  end

  // The banks must tile the file exactly.
  initial assert (NUM_REGS % NUM_BANKS == 0)
    else $error("NUM_REGS must be a multiple of NUM_BANKS");
endmodule
