// bank_power_ctrl: power state of every register-file bank.
//
// The compiler places a bank power instruction in front of every basic block.
// Its operand, pwr_mask, lists the banks the block needs (bit b = 1: bank b
// powered); every other bank is sent to the low-power state for the block.
// This controller keeps the per-bank state and drives the per-bank request to
// the supply that lowers the bank's voltage.
//
// Interface and timing:
//  * pwr_valid/pwr_mask: one-cycle pulse; the new state is visible on
//    bank_on/bank_lp from the next clock edge on, i.e. for the first
//    instruction of the basic block that follows the power instruction.
//  * bank_on[b] = 1: bank b is active. bank_lp = ~bank_on is the low-power
//    request to the bank's voltage supply.
//  * on_count: how many banks are active this cycle; integrated over time it
//    is the leakage cost of the register file in bank-cycles.
//  * Reset (rst_n low, synchronous) powers every bank, the state of a file
//    that knows nothing about banking; the first power instruction then turns
//    off what the program does not use.
//
// Per-bank state chosen by compiler-inserted instructions follows the
// architecture. The instruction's mask encoding, the one-cycle latency and
// the reset state are this design's choices.
module bank_power_ctrl #(
  parameter int unsigned NUM_BANKS = rf_pkg::NUM_BANKS,
  localparam int unsigned CW       = $clog2(NUM_BANKS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pwr_valid,
  input  logic [NUM_BANKS-1:0] pwr_mask,
  output logic [NUM_BANKS-1:0] bank_on,
  output logic [NUM_BANKS-1:0] bank_lp,
  output logic [CW-1:0]        on_count
);
  always_ff @(posedge clk) begin
    if (!rst_n)         bank_on <= '1;
    else if (pwr_valid) bank_on <= pwr_mask;
  end

  assign bank_lp = ~bank_on;

  // A power instruction's mask is the complete bank state one cycle later,
  // and without an instruction the state does not change.
  a_apply: assert property (@(posedge clk) disable iff (!rst_n)
                            pwr_valid |=> bank_on == $past(pwr_mask));
  a_hold:  assert property (@(posedge clk) disable iff (!rst_n)
                            !pwr_valid |=> $stable(bank_on));

  always_comb begin
    on_count = '0;
    for (int b = 0; b < NUM_BANKS; b++) on_count += CW'(bank_on[b]);
  end
endmodule
