// rf_bank: one bank of the banked register file.
//
// A bank holds DEPTH consecutive registers of the shared file and is reached
// by all NRD read and NWR write ports of the file (the address decode in
// banked_rf raises a port's rd_en/wr_en only when the port's register lies in
// this bank). The bank has its own power state, `active`, set by the bank
// power controller: in the low-power state the supply of the bank is lowered,
// so the bank must not be read or written.
//
// Behaviour:
//  * Reads are combinational: rd_data[p] shows the word rd_idx[p] in the same
//    cycle. A read during a write to the same word returns the old word.
//  * Writes take effect at the rising clock edge. Two write ports writing the
//    same word in one cycle: the higher-numbered port wins.
//  * While `active` is low, writes are dropped, read data is forced to zero
//    (the outputs of a bank at reduced voltage are not trusted) and any
//    enabled port raises `sleep_access`. The stored words are kept, so a
//    bank brought back to the active state holds what it held before.
//  * rst_n (active low, synchronous) clears every word.
//
// Splitting the file into banks with a per-bank low-power state follows the
// architecture. Combinational reads, write priority, zeroed reads and the
// retention of data in the low-power state are this design's choices.
module rf_bank #(
  parameter int unsigned DEPTH  = rf_pkg::NUM_REGS / rf_pkg::NUM_BANKS,
  parameter int unsigned DATA_W = rf_pkg::DATA_W,
  parameter int unsigned NRD    = rf_pkg::NUM_RD,
  parameter int unsigned NWR    = rf_pkg::NUM_WR,
  localparam int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        active,
  input  logic [NRD-1:0]              rd_en,
  input  logic [NRD-1:0][IW-1:0]      rd_idx,
  output logic [NRD-1:0][DATA_W-1:0]  rd_data,
  input  logic [NWR-1:0]              wr_en,
  input  logic [NWR-1:0][IW-1:0]      wr_idx,
  input  logic [NWR-1:0][DATA_W-1:0]  wr_data,
  output logic                        sleep_access
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (active) begin
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) mem[wr_idx[w]] <= wr_data[w];
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++)
      rd_data[r] = (active && rd_en[r]) ? mem[rd_idx[r]] : '0;
  end

  assign sleep_access = !active && ((|rd_en) || (|wr_en));
endmodule
