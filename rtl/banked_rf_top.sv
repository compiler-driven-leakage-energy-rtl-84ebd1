// banked_rf_top: shared register file of a 4-issue VLIW with per-bank
// leakage control.
//
// The register file shared by all issue slots is the block whose leakage this
// design attacks. It is split into NUM_BANKS banks; a bank the running basic
// block does not use is put into a low-power (reduced-voltage) state. The
// compiler packs the operands of each instruction into one bank and puts a
// bank power instruction before each basic block naming the banks the block
// needs, so the register file keeps working at full speed while most banks
// sleep.
//
// Contents:
//  * bank_power_ctrl  - per-bank power state, loaded by pwr_valid/pwr_mask.
//  * banked_rf        - NUM_REGS x DATA_W file, 2 read + 1 write port per slot
//                       (8R/4W for 4 slots), one rf_bank per bank.
//  * slot_xbar (x4)   - full crossbar from each slot's three ports to the
//                       slot's NUM_FU functional units.
// The functional units themselves and the voltage supply of the banks are
// outside: the units connect through fu_opa/fu_opb/fu_result, the supply
// through bank_lp.
//
// Port mapping: slot s read port k is file read port 2*s+k, slot s write port
// is file write port s. Timing: operands appear combinationally in the cycle
// the read address is presented; a result is written at the rising edge of
// the cycle with wr_en set. A power instruction (pwr_valid) changes bank_on
// from the next cycle. sleep_access flags a port that touched a bank in the
// low-power state (a compiler error; the access is suppressed).
//
// Sizes follow the evaluated configuration (32-bit, 128 entries, 8 banks,
// 4 slots); NUM_FU per slot is this design's choice.
module banked_rf_top
  import rf_pkg::*;
#(
  parameter int unsigned NUM_REGS_P  = rf_pkg::NUM_REGS,
  parameter int unsigned NUM_BANKS_P = rf_pkg::NUM_BANKS,
  parameter int unsigned NUM_SLOTS_P = rf_pkg::NUM_SLOTS,
  parameter int unsigned NUM_FU      = 2,
  parameter int unsigned DATA_W_P    = rf_pkg::DATA_W,
  localparam int unsigned AW  = $clog2(NUM_REGS_P),
  localparam int unsigned SW  = (NUM_FU > 1) ? $clog2(NUM_FU) : 1,
  localparam int unsigned CW  = $clog2(NUM_BANKS_P + 1),
  localparam int unsigned NRD = NUM_SLOTS_P * RD_PER_SLOT,
  localparam int unsigned NWR = NUM_SLOTS_P * WR_PER_SLOT
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  // bank power instruction
  input  logic                                          pwr_valid,
  input  logic [NUM_BANKS_P-1:0]                        pwr_mask,
  // per slot: register reads
  input  logic [NUM_SLOTS_P-1:0][1:0]                   rd_en,
  input  logic [NUM_SLOTS_P-1:0][1:0][AW-1:0]           rd_addr,
  input  logic [NUM_SLOTS_P-1:0][NUM_FU-1:0]            opa_sel,
  input  logic [NUM_SLOTS_P-1:0][NUM_FU-1:0]            opb_sel,
  output logic [NUM_SLOTS_P-1:0][NUM_FU-1:0][DATA_W_P-1:0] fu_opa,
  output logic [NUM_SLOTS_P-1:0][NUM_FU-1:0][DATA_W_P-1:0] fu_opb,
  // per slot: result write-back
  input  logic [NUM_SLOTS_P-1:0][NUM_FU-1:0][DATA_W_P-1:0] fu_result,
  input  logic [NUM_SLOTS_P-1:0][SW-1:0]                wb_sel,
  input  logic [NUM_SLOTS_P-1:0]                        wr_en,
  input  logic [NUM_SLOTS_P-1:0][AW-1:0]                wr_addr,
  // bank state
  output logic [NUM_BANKS_P-1:0]                        bank_on,
  output logic [NUM_BANKS_P-1:0]                        bank_lp,
  output logic [CW-1:0]                                 on_count,
  output logic [NUM_BANKS_P-1:0]                        bank_used,
  output logic [NUM_BANKS_P-1:0]                        sleep_access
);
  logic [NRD-1:0]               f_rd_en;
  logic [NRD-1:0][AW-1:0]       f_rd_addr;
  logic [NRD-1:0][DATA_W_P-1:0] f_rd_data;
  logic [NWR-1:0][DATA_W_P-1:0] f_wr_data;

  always_comb begin
    for (int s = 0; s < NUM_SLOTS_P; s++)
      for (int k = 0; k < 2; k++) begin
        f_rd_en[2*s+k]   = rd_en[s][k];
        f_rd_addr[2*s+k] = rd_addr[s][k];
      end
  end

  bank_power_ctrl #(.NUM_BANKS(NUM_BANKS_P)) u_pwr (
    .clk      (clk),
    .rst_n    (rst_n),
    .pwr_valid(pwr_valid),
    .pwr_mask (pwr_mask),
    .bank_on  (bank_on),
    .bank_lp  (bank_lp),
    .on_count (on_count)
  );

  banked_rf #(
    .NUM_REGS (NUM_REGS_P),
    .NUM_BANKS(NUM_BANKS_P),
    .DATA_W   (DATA_W_P),
    .NRD      (NRD),
    .NWR      (NWR)
  ) u_rf (
    .clk         (clk),
    .rst_n       (rst_n),
    .bank_on     (bank_on),
    .rd_en       (f_rd_en),
    .rd_addr     (f_rd_addr),
    .rd_data     (f_rd_data),
    .wr_en       (wr_en),
    .wr_addr     (wr_addr),
    .wr_data     (f_wr_data),
    .bank_used   (bank_used),
    .sleep_access(sleep_access)
  );

  for (genvar s = 0; s < NUM_SLOTS_P; s++) begin : g_slot
    slot_xbar #(.NUM_FU(NUM_FU), .DATA_W(DATA_W_P)) u_xbar (
      .rd_data  (f_rd_data[2*s+1 : 2*s]),
      .opa_sel  (opa_sel[s]),
      .opb_sel  (opb_sel[s]),
      .fu_opa   (fu_opa[s]),
      .fu_opb   (fu_opb[s]),
      .fu_result(fu_result[s]),
      .wb_sel   (wb_sel[s]),
      .wr_data  (f_wr_data[s])
    );
  end
endmodule
