// leakage_bench: runs a set of register-pressure profiles on one banked
// register file configuration (NB banks) and measures the fraction of
// bank-cycles spent powered, i.e. the leakage energy normalised to a file
// whose banks are always on.
//
// For each profile the compiler model assigns LIVE registers, three per
// instruction (two sources, one destination) that must share a bank: the
// first operand takes the first free register of a free list kept in register
// order, each further operand is the first free register of that same bank,
// and when a bank runs out the instruction starts over in the next bank. The
// power instruction in front of the block names the banks holding assigned
// registers. The block then runs BLOCK_LEN bundles, four instructions per
// bundle, drawn from the assigned instructions; operands are checked against
// a reference model. The measured powered fraction must equal the expected
// level of the profile for NB banks (table EXP_Q8, in eighths), and the
// average over the profiles is printed. A second run assigns the same number of registers
// without the bank rule, from a shuffled free list, as a compiler unaware of
// banking would, and must not come out better.
module leakage_bench #(
  parameter int NB = 8
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  import rf_pkg::*;
  localparam int NS = NUM_SLOTS, NR = NUM_REGS, NF = 2, DW = DATA_W, BD = NR / NB;
  localparam int BLOCK_LEN = 40;
  localparam int NPROF = 8;
  // live registers per profile and their names (see tb_leakage_workloads)
  localparam int LIVE [NPROF] = '{12, 12, 60, 60, 60, 14, 28, 127};
  // expected powered fraction in eighths, per profile, for 2, 4 and 8 banks
  localparam int EXP2 [NPROF] = '{4, 4, 4, 4, 4, 4, 4, 8};
  localparam int EXP4 [NPROF] = '{2, 2, 4, 4, 4, 2, 2, 8};
  localparam int EXP8 [NPROF] = '{1, 1, 4, 4, 4, 1, 2, 8};
  function automatic int exp_q8(int p);
    return (NB == 2) ? EXP2[p] : (NB == 4) ? EXP4[p] : EXP8[p];
  endfunction

  logic rst_n;
  logic pwr_valid; logic [NB-1:0] pwr_mask;
  logic [NS-1:0][1:0] rd_en; logic [NS-1:0][1:0][6:0] rd_addr;
  logic [NS-1:0][NF-1:0] opa_sel, opb_sel;
  logic [NS-1:0][NF-1:0][DW-1:0] fu_opa, fu_opb, fu_result;
  logic [NS-1:0][0:0] wb_sel; logic [NS-1:0] wr_en; logic [NS-1:0][6:0] wr_addr;
  logic [NB-1:0] bank_on, bank_lp, bank_used, sleep_access;
  logic [$clog2(NB+1)-1:0] on_count;

  banked_rf_top #(.NUM_BANKS_P(NB)) dut (.*);

  always_comb
    for (int s = 0; s < NS; s++) begin
      fu_result[s][0] = fu_opa[s][0] + fu_opb[s][0];
      fu_result[s][1] = fu_opa[s][1] ^ fu_opb[s][1];
    end

  logic [DW-1:0] model [NR];
  bit measuring = 0;
  int on_cycles, cycles;
  always @(posedge clk) if (measuring) begin on_cycles += int'(on_count); cycles++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL NB=%0d %s at %0t", NB, what, $time); end
  endtask

  // instruction list produced by the compiler model: 3 registers each
  int ins [$][3];

  // bank-aware assignment (bank rule) of `live` registers
  function automatic void assign_aware(int live);
    bit used [NR];
    int got = 0, b = 0;
    ins.delete();
    foreach (used[i]) used[i] = 0;
    used[0] = 1;  // r0 reserved
    while (got < live) begin
      int ops[3]; int n = 0;
      for (int r = 0; r < NR && n == 0; r++) if (!used[r]) ops[n++] = r;  // first free register
      if (n == 0) break;
      b = ops[0] / BD;
      for (int r = ops[0] + 1; r < (b + 1) * BD && n < 3; r++) if (!used[r]) ops[n++] = r;
      // fewer than three free in this bank: reuse already assigned registers of
      // the bank for the missing operands (values dead by then)
      for (int k = 0; k < n && got < live; k++) begin used[ops[k]] = 1; got++; end
      for (int k = n; k < 3; k++) ops[k] = ops[k % n];
      ins.push_back(ops);
    end
  endfunction

  // bank-unaware assignment: any free register from a shuffled list
  function automatic void assign_unaware(int live);
    int list [$];
    ins.delete();
    for (int r = 1; r < NR; r++) list.push_back(r);
    list.shuffle();
    list = list[0:live-1];
    for (int i = 0; i < live; i += 3)
      ins.push_back('{list[i], list[(i + 1) % live], list[(i + 2) % live]});
  endfunction

  function automatic logic [NB-1:0] banks_of_ins();
    logic [NB-1:0] m = '0;
    foreach (ins[i]) for (int k = 0; k < 3; k++) m[ins[i][k] / BD] = 1;
    return m;
  endfunction

  task automatic run_block(input logic [NB-1:0] mask, output real frac);
    @(negedge clk);
    pwr_valid = 1; pwr_mask = mask;
    @(negedge clk);
    pwr_valid = 0;
    on_cycles = 0; cycles = 0; measuring = 1;
    for (int c = 0; c < BLOCK_LEN; c++) begin
      int sel [NS];
      for (int s = 0; s < NS; s++) begin
        sel[s] = $urandom_range(0, ins.size() - 1);
        rd_en[s] = 2'b11;
        rd_addr[s][0] = 7'(ins[sel[s]][0]); rd_addr[s][1] = 7'(ins[sel[s]][1]);
        opa_sel[s] = NF'($urandom); opb_sel[s] = NF'($urandom); wb_sel[s] = 1'($urandom);
        wr_en[s] = 1; wr_addr[s] = 7'(ins[sel[s]][2]);
      end
      #1;
      for (int s = 0; s < NS; s++) for (int f = 0; f < NF; f++)
        check(fu_opa[s][f] == model[rd_addr[s][opa_sel[s][f]]] &&
              fu_opb[s][f] == model[rd_addr[s][opb_sel[s][f]]], "operands");
      check(sleep_access == '0, "no access to a sleeping bank");
      @(posedge clk);
      for (int s = 0; s < NS; s++)
        model[wr_addr[s]] = wb_sel[s] ? (fu_opa[s][1] ^ fu_opb[s][1]) : (fu_opa[s][0] + fu_opb[s][0]);
      @(negedge clk);
    end
    measuring = 0;
    rd_en = '0; wr_en = '0;
    frac = real'(on_cycles) / real'(cycles * NB);
  endtask

  initial begin
    real aware, unaware, expect_frac, sum_aware;
    done = 0; checks = 0; failures = 0;
    rst_n = 0; pwr_valid = 0; pwr_mask = '1; rd_en = '0; wr_en = '0;
    rd_addr = '0; wr_addr = '0; opa_sel = '0; opb_sel = '0; wb_sel = '0;
    wait (start);
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    foreach (model[i]) model[i] = '0;
    sum_aware = 0.0;
    for (int p = 0; p < NPROF; p++) begin
      assign_aware(LIVE[p]);
      run_block(banks_of_ins(), aware);
      sum_aware += aware;
      expect_frac = real'(exp_q8(p)) / 8.0;
      check(aware == expect_frac, $sformatf("profile %0d powered fraction", p));
      assign_unaware(LIVE[p]);
      run_block(banks_of_ins(), unaware);
      check(unaware >= aware, $sformatf("profile %0d unaware not better", p));
      $display("NB=%0d profile %0d live=%0d: bank-aware %0.3f (expected %0.3f), bank-unaware %0.3f",
               NB, p, LIVE[p], aware, expect_frac, unaware);
    end
    $display("NB=%0d average normalised leakage over the profiles: %0.4f", NB, sum_aware / NPROF);
    done = 1;
  end
endmodule
