// tb_banked_rf_top: end-to-end test of the banked register file subsystem at
// its default size (128 x 32-bit registers, 8 banks, 4 slots, 2 functional
// units per slot).
//
// The testbench plays the parts that sit around the register file:
//  * a compiler model that assigns registers bank by bank: for each
//    instruction it takes registers from a FIFO of registers and rejects any
//    that lies in a different bank from the instruction's other operands, so
//    all three operands of an instruction share a bank;
//  * a bank power instruction in front of every basic block, naming exactly
//    the banks the block's instructions touch;
//  * behavioural functional units (unit 0 adds, unit 1 XORs).
// Every operand delivered to a functional unit and every register value is
// compared with a flat reference model. The test then counts the powered
// bank-cycles against a file with every bank always on.
//
// Mechanisms that must each occur at least once (failure otherwise): bank
// switched off, bank switched back on with its data retained, all four slots
// writing in one cycle, two slots writing one register (higher slot wins),
// use of each read port and each functional unit through the crossbar, and
// detection of an access to a bank in the low-power state.
module tb_banked_rf_top;
  import rf_pkg::*;
  localparam int NB = NUM_BANKS, NS = NUM_SLOTS, NR = NUM_REGS, NF = 2, DW = DATA_W;
  localparam int BD = NR / NB;
  localparam int NUM_BB = 60;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic pwr_valid; logic [NB-1:0] pwr_mask;
  logic [NS-1:0][1:0] rd_en; logic [NS-1:0][1:0][6:0] rd_addr;
  logic [NS-1:0][NF-1:0] opa_sel, opb_sel;
  logic [NS-1:0][NF-1:0][DW-1:0] fu_opa, fu_opb, fu_result;
  logic [NS-1:0][0:0] wb_sel; logic [NS-1:0] wr_en; logic [NS-1:0][6:0] wr_addr;
  logic [NB-1:0] bank_on, bank_lp, bank_used, sleep_access; logic [3:0] on_count;

  banked_rf_top dut (.*);

  // behavioural functional units; while seed_mode is set they emit a
  // constant (a load-immediate) so the file can be given distinct values
  logic seed_mode = 0;
  logic [NS-1:0][DW-1:0] seed_val;
  always_comb
    for (int s = 0; s < NS; s++) begin
      fu_result[s][0] = seed_mode ? seed_val[s] : fu_opa[s][0] + fu_opb[s][0];
      fu_result[s][1] = seed_mode ? seed_val[s] : fu_opa[s][1] ^ fu_opb[s][1];
    end

  logic [DW-1:0] model [NR];
  int on_cycles = 0, all_cycles = 0;
  int n_off = 0, n_on_retained = 0, n_four_writes = 0, n_same_dst = 0, n_port1 = 0, n_fu1 = 0, n_sleep = 0;

  always @(posedge clk) if (rst_n) begin
    on_cycles += int'(on_count);
    all_cycles++;
  end

  // ---- compiler model: bank-aware register assignment from a FIFO ----
  int fifo[$];
  function automatic int take_reg(int bank);
    // pop registers until one of the wanted bank turns up; rejected ones go
    // back to the tail of the FIFO (bank < 0: any bank)
    for (int tries = 0; tries < NR; tries++) begin
      int r = fifo.pop_front();
      fifo.push_back(r);
      if (r != 0 && (bank < 0 || r / BD == bank)) return r;  // r0 reserved
    end
    return -1;
  endfunction

  task automatic idle_ports();
    rd_en = '0; wr_en = '0; pwr_valid = 0;
  endtask

  // One cycle of four instructions. banks_ok: the banks the block may use.
  task automatic issue_bundle(input logic [NB-1:0] banks_ok, input bit force_same_dst);
    int src[NS][2]; int dst[NS]; int bank;
    logic [DW-1:0] exp_a, exp_b, res;
    logic [NB-1:0] used;
    used = '0;
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      // pick the instruction's bank among the powered ones
      do bank = $urandom_range(0, NB - 1); while (!banks_ok[bank]);
      src[s][0] = take_reg(bank); src[s][1] = take_reg(bank); dst[s] = take_reg(bank);
      rd_en[s] = 2'b11;
      rd_addr[s][0] = 7'(src[s][0]); rd_addr[s][1] = 7'(src[s][1]);
      opa_sel[s] = NF'($urandom); opb_sel[s] = NF'($urandom);
      wb_sel[s] = 1'($urandom);
      wr_en[s] = 1; wr_addr[s] = 7'(dst[s]);
    end
    if (force_same_dst) wr_addr[NS-1] = wr_addr[0];
    #1;
    for (int s = 0; s < NS; s++) begin
      for (int f = 0; f < NF; f++) begin
        exp_a = model[rd_addr[s][opa_sel[s][f]]];
        exp_b = model[rd_addr[s][opb_sel[s][f]]];
        check(fu_opa[s][f] == exp_a && fu_opb[s][f] == exp_b, $sformatf("operands slot %0d fu %0d", s, f));
        if (opa_sel[s][f] || opb_sel[s][f]) n_port1++;
      end
      if (wb_sel[s]) n_fu1++;
    end
    check(sleep_access == '0, "no sleeping-bank access under the compiler model");
    n_four_writes++;
    for (int a = 0; a < NS; a++) for (int b = a + 1; b < NS; b++) if (wr_addr[a] == wr_addr[b]) n_same_dst++;
    @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      res = wb_sel[s] ? (fu_opa[s][1] ^ fu_opb[s][1]) : (fu_opa[s][0] + fu_opb[s][0]);
      model[wr_addr[s]] = res;  // later slots overwrite earlier ones
    end
  endtask

  task automatic power_instr(input logic [NB-1:0] mask);
    logic [NB-1:0] prev_on;
    @(negedge clk);
    idle_ports();
    prev_on = bank_on;
    pwr_valid = 1; pwr_mask = mask;
    @(posedge clk); #1;
    check(bank_on == mask && bank_lp == ~mask, "power instruction applied");
    if ((prev_on & ~mask) != 0) n_off++;
    @(negedge clk); pwr_valid = 0;
    // a bank that has come back must still hold its words
    for (int b = 0; b < NB; b++) if (mask[b] && !prev_on[b]) begin
      rd_en = '0; rd_en[0][0] = 1; rd_addr[0][0] = 7'(b * BD + $urandom_range(0, BD - 1)); opa_sel[0] = '0;
      #1;
      check(fu_opa[0][0] == model[rd_addr[0][0]], "retention after wake-up");
      n_on_retained++;
      @(negedge clk);
    end
    rd_en = '0;
  endtask

  initial begin
    idle_ports(); pwr_mask = '1; rd_addr = '0; wr_addr = '0; opa_sel = '0; opb_sel = '0; wb_sel = '0;
    for (int r = 0; r < NR; r++) fifo.push_back(r);
    fifo.shuffle();
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < NR; r++) model[r] = '0;
    check(bank_on == '1, "all banks on after reset");

    // give every register a distinct random value, four per cycle
    seed_mode = 1;
    for (int r = 0; r < NR; r += NS) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        wr_en[s] = 1; wr_addr[s] = 7'(r + s); wb_sel[s] = 1'($urandom); seed_val[s] = $urandom;
      end
      @(posedge clk);
      for (int s = 0; s < NS; s++) model[r + s] = seed_val[s];
    end
    @(negedge clk); idle_ports(); seed_mode = 0;

    // basic blocks: power instruction, then a run of bundles in the named banks
    for (int bb = 0; bb < NUM_BB; bb++) begin
      logic [NB-1:0] mask;
      int nbk;
      // register pressure of the block: how many banks it needs
      nbk = (bb % 5 == 0) ? $urandom_range(1, NB) : $urandom_range(1, 2);
      mask = '0;
      while ($countones(mask) < nbk) mask[$urandom_range(0, NB - 1)] = 1;
      power_instr(mask);
      for (int i = 0; i < 6; i++) issue_bundle(mask, (i == 3));
    end

    // an access the compiler should never produce: a read of a sleeping bank
    power_instr(8'b0000_0001);
    @(negedge clk);
    rd_en = '0; rd_en[2][1] = 1; rd_addr[2][1] = 7'(3 * BD + 1);
    wr_en = '0; wr_en[1] = 1; wr_addr[1] = 7'(5 * BD); wb_sel[1] = 0;
    #1;
    check(sleep_access == 8'b0010_1000, "sleeping-bank access flagged");
    check(bank_used == 8'b0010_1000, "bank_used");
    if (sleep_access != 0) n_sleep++;
    @(posedge clk);
    @(negedge clk); idle_ports();
    power_instr('1);
    // the dropped write left register 5*BD untouched
    rd_en[0][0] = 1; rd_addr[0][0] = 7'(5 * BD); opa_sel[0] = '0; #1;
    check(fu_opa[0][0] == model[5 * BD], "write to sleeping bank dropped");
    @(negedge clk); idle_ports();

    // full read-back of the file through all read ports
    for (int r = 0; r < NR; r += 2 * NS) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        rd_en[s] = 2'b11; rd_addr[s][0] = 7'(r + 2 * s); rd_addr[s][1] = 7'(r + 2 * s + 1);
        opa_sel[s] = '0; opb_sel[s] = '1;
      end
      #1;
      for (int s = 0; s < NS; s++)
        check(fu_opa[s][0] == model[r + 2 * s] && fu_opb[s][0] == model[r + 2 * s + 1], "read-back");
    end

    $display("powered bank-cycles %0d of %0d (normalised leakage %0.3f)", on_cycles, all_cycles * NB,
             real'(on_cycles) / real'(all_cycles * NB));
    $display("mechanisms: bank_off=%0d bank_on_retained=%0d four_writes=%0d same_dst=%0d port1=%0d fu1=%0d sleep_access=%0d",
             n_off, n_on_retained, n_four_writes, n_same_dst, n_port1, n_fu1, n_sleep);
    check(n_off > 0, "mechanism: bank switched off");
    check(n_on_retained > 0, "mechanism: bank woken with data");
    check(n_four_writes > 0, "mechanism: four writes in a cycle");
    check(n_same_dst > 0, "mechanism: two slots write one register");
    check(n_port1 > 0, "mechanism: read port 1 via crossbar");
    check(n_fu1 > 0, "mechanism: unit 1 result written");
    check(n_sleep > 0, "mechanism: sleeping-bank access detected");
    check(on_cycles < all_cycles * NB, "banking saved powered bank-cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
