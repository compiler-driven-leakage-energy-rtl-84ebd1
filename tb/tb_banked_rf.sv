// tb_banked_rf: self-checking test of the banked register file.
//
// Default size (128 x 32 bits, 8 banks, 8 read and 4 write ports), then a
// 2-bank instance. Random register numbers over the whole file on every port,
// random bank power masks; a flat 128-entry reference model gives the
// expected read data, and the expected bank_used/sleep_access flags are
// computed from the register numbers (bank = register / 16, resp. / 64).
// Also checks that a bank keeps its contents through a low-power period.
module tb_banked_rf;
  localparam int NR = 128, DW = 32, NRD = 8, NWR = 4, AW = 7;
  localparam int CYCLES = 3000;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (30 * CYCLES) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [NRD-1:0] rd_en; logic [NRD-1:0][AW-1:0] rd_addr;
  logic [NWR-1:0] wr_en; logic [NWR-1:0][AW-1:0] wr_addr; logic [NWR-1:0][DW-1:0] wr_data;
  logic [7:0] on8, used8, sl8; logic [1:0] on2, used2, sl2;
  logic [NRD-1:0][DW-1:0] rd8, rd2;

  banked_rf dut8 (.clk, .rst_n, .bank_on(on8), .rd_en, .rd_addr, .rd_data(rd8), .wr_en, .wr_addr, .wr_data,
                  .bank_used(used8), .sleep_access(sl8));
  banked_rf #(.NUM_BANKS(2)) dut2 (.clk, .rst_n, .bank_on(on2), .rd_en, .rd_addr, .rd_data(rd2), .wr_en, .wr_addr,
                  .wr_data, .bank_used(used2), .sleep_access(sl2));

  logic [DW-1:0] m8 [NR], m2 [NR];
  int n_sleep = 0;

  function automatic int bank_of(int r, int nb); return r / (NR / nb); endfunction

  task automatic compare();
    logic [7:0] eu8, es8; logic [1:0] eu2, es2;
    eu8 = '0; es8 = '0; eu2 = '0; es2 = '0;
    for (int p = 0; p < NRD; p++) if (rd_en[p]) begin
      eu8[bank_of(rd_addr[p], 8)] = 1; eu2[bank_of(rd_addr[p], 2)] = 1;
      check(rd8[p] == (on8[bank_of(rd_addr[p], 8)] ? m8[rd_addr[p]] : 0), $sformatf("rd8 port %0d", p));
      check(rd2[p] == (on2[bank_of(rd_addr[p], 2)] ? m2[rd_addr[p]] : 0), $sformatf("rd2 port %0d", p));
    end else begin
      check(rd8[p] == 0 && rd2[p] == 0, "idle port reads zero");
    end
    for (int p = 0; p < NWR; p++) if (wr_en[p]) begin
      eu8[bank_of(wr_addr[p], 8)] = 1; eu2[bank_of(wr_addr[p], 2)] = 1;
    end
    es8 = eu8 & ~on8; es2 = eu2 & ~on2;
    check(used8 == eu8 && sl8 == es8, "bank flags 8");
    check(used2 == eu2 && sl2 == es2, "bank flags 2");
    if (sl8 != 0) n_sleep++;
  endtask

  task automatic update();
    for (int p = 0; p < NWR; p++) if (wr_en[p]) begin
      if (on8[bank_of(wr_addr[p], 8)]) m8[wr_addr[p]] = wr_data[p];
      if (on2[bank_of(wr_addr[p], 2)]) m2[wr_addr[p]] = wr_data[p];
    end
  endtask

  initial begin
    on8 = '1; on2 = '1; rd_en = '0; wr_en = '0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < NR; i++) begin m8[i] = 0; m2[i] = 0; end
    // fill the whole file, 4 registers per cycle
    for (int i = 0; i < NR; i += NWR) begin
      @(negedge clk);
      wr_en = '1;
      for (int p = 0; p < NWR; p++) begin wr_addr[p] = AW'(i + p); wr_data[p] = 32'h1000_0000 + i + p; end
      #1 compare();
      @(posedge clk); update();
    end
    // random traffic
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) on8 = 8'($urandom) | 8'h01;
      if ($urandom_range(0, 7) == 0) on2 = 2'($urandom) | 2'b01;
      rd_en = NRD'($urandom); wr_en = NWR'($urandom);
      for (int p = 0; p < NRD; p++) rd_addr[p] = AW'($urandom);
      for (int p = 0; p < NWR; p++) begin wr_addr[p] = AW'($urandom); wr_data[p] = $urandom; end
      #1 compare();
      @(posedge clk); update();
    end
    // retention: bank 5 sleeps, then wakes with its old contents
    @(negedge clk); wr_en = '0; rd_en = '1; on8 = 8'hff & ~8'h20; on2 = 2'b11;
    for (int p = 0; p < NRD; p++) rd_addr[p] = AW'(80 + p);
    #1 compare();
    @(negedge clk); on8 = 8'hff; #1;
    for (int p = 0; p < NRD; p++) check(rd8[p] == m8[80 + p] && rd8[p] != 0, "retention");
    check(n_sleep > 0, "coverage: sleeping-bank access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
