// tb_rf_bank: self-checking test of one register-file bank.
//
// Drives random reads and writes on all 8 read and 4 write ports while the
// bank's power state toggles at random, and compares every read word and the
// sleep_access flag with a reference array kept in the testbench. Covers:
// same-cycle (combinational) reads, read-during-write returning the old word,
// several ports writing one word (highest port wins), dropped writes and
// zeroed reads in the low-power state, retention across a sleep period, and
// synchronous reset.
module tb_rf_bank;
  localparam int DEPTH = 16, DW = 32, NRD = 8, NWR = 4, IW = 4;
  localparam int CYCLES = 3000;

  logic clk = 0, rst_n = 0, active;
  logic [NRD-1:0] rd_en;  logic [NRD-1:0][IW-1:0] rd_idx;  logic [NRD-1:0][DW-1:0] rd_data;
  logic [NWR-1:0] wr_en;  logic [NWR-1:0][IW-1:0] wr_idx;  logic [NWR-1:0][DW-1:0] wr_data;
  logic sleep_access;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [DEPTH];
  int n_sleep_acc = 0, n_conflict = 0, n_rdw = 0;

  rf_bank #(.DEPTH(DEPTH), .DATA_W(DW), .NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20 * CYCLES) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    active = 1; rd_en = '0; wr_en = '0; rd_idx = '0; wr_idx = '0; wr_data = '0;
    // preload garbage, then reset clears it
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    wr_en = '1; for (int w = 0; w < NWR; w++) begin wr_idx[w] = IW'(w); wr_data[w] = 32'hdead0000 + w; end
    @(negedge clk); wr_en = '0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    rd_en = '1; for (int r = 0; r < NRD; r++) rd_idx[r] = IW'(r);
    #1;
    for (int r = 0; r < NRD; r++) check(rd_data[r] == 0, "reset clears");

    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      active = ($urandom_range(0, 9) != 0);
      rd_en = NRD'($urandom); wr_en = NWR'($urandom);
      for (int r = 0; r < NRD; r++) rd_idx[r] = IW'($urandom);
      for (int w = 0; w < NWR; w++) begin wr_idx[w] = IW'($urandom_range(0, 5)); wr_data[w] = $urandom; end
      #1;
      for (int r = 0; r < NRD; r++) begin
        logic [DW-1:0] exp;
        exp = (active && rd_en[r]) ? model[rd_idx[r]] : '0;
        check(rd_data[r] == exp, $sformatf("read port %0d", r));
        for (int w = 0; w < NWR; w++) if (active && rd_en[r] && wr_en[w] && wr_idx[w] == rd_idx[r]) n_rdw++;
      end
      check(sleep_access == (!active && (rd_en != 0 || wr_en != 0)), "sleep_access");
      if (sleep_access) n_sleep_acc++;
      for (int a = 0; a < NWR; a++) for (int b = a + 1; b < NWR; b++)
        if (wr_en[a] && wr_en[b] && wr_idx[a] == wr_idx[b]) n_conflict++;
      @(posedge clk);
      if (active) for (int w = 0; w < NWR; w++) if (wr_en[w]) model[wr_idx[w]] = wr_data[w];
    end
    check(n_sleep_acc > 0 && n_conflict > 0 && n_rdw > 0, "coverage");
    $display("sleep accesses %0d, write conflicts %0d, read-during-write %0d", n_sleep_acc, n_conflict, n_rdw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
