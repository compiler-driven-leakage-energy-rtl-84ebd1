// rf_pkg: shared constants of the banked register file.
//
// The register file serves a 4-issue, 32-bit VLIW machine. Every issue slot
// owns two read ports and one write port, so the file has 8 read and 4 write
// ports and 128 entries. The file is cut into NUM_BANKS banks of consecutive
// registers (register r lives in bank r / (NUM_REGS/NUM_BANKS)); each bank can
// be put into a low-power (reduced supply voltage) state on its own.
//
// The sizes (32 bits, 128 entries, 4 slots, 2R+1W per slot, 8 banks) are the
// configuration evaluated for this architecture; 8 banks is the partitioning
// with the largest leakage saving, 2 and 4 banks are reached by overriding
// NUM_BANKS in the modules. Mapping registers to banks by their upper address
// bits is this design's choice.
package rf_pkg;
  parameter int unsigned DATA_W      = 32;
  parameter int unsigned NUM_REGS    = 128;
  parameter int unsigned NUM_BANKS   = 8;
  parameter int unsigned NUM_SLOTS   = 4;
  parameter int unsigned RD_PER_SLOT = 2;
  parameter int unsigned WR_PER_SLOT = 1;
  parameter int unsigned NUM_RD      = NUM_SLOTS * RD_PER_SLOT;  // 8 read ports
  parameter int unsigned NUM_WR      = NUM_SLOTS * WR_PER_SLOT;  // 4 write ports
  parameter int unsigned REG_AW      = $clog2(NUM_REGS);         // 7

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [REG_AW-1:0] reg_addr_t;

  // Power state of a bank as seen by the access logic.
  typedef enum logic {BANK_LOW_POWER = 1'b0, BANK_ACTIVE = 1'b1} bank_state_e;
endpackage
