// tb_bank_power_ctrl: self-checking test of the bank power controller.
//
// Checks the reset state (all banks powered), that a power instruction's mask
// appears on bank_on one cycle after it is issued and not earlier, that the
// state holds while no instruction is issued, that bank_lp is the inverse of
// bank_on and that on_count counts the powered banks. Runs the 8-bank default
// and a 2-bank instance.
module tb_bank_power_ctrl;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // 8 banks
  logic pv8; logic [7:0] pm8, on8, lp8; logic [3:0] cnt8;
  bank_power_ctrl #(.NUM_BANKS(8)) dut8 (.clk, .rst_n, .pwr_valid(pv8), .pwr_mask(pm8),
                                          .bank_on(on8), .bank_lp(lp8), .on_count(cnt8));
  // 2 banks
  logic pv2; logic [1:0] pm2, on2, lp2; logic [1:0] cnt2;
  bank_power_ctrl #(.NUM_BANKS(2)) dut2 (.clk, .rst_n, .pwr_valid(pv2), .pwr_mask(pm2),
                                          .bank_on(on2), .bank_lp(lp2), .on_count(cnt2));

  logic [7:0] exp8; logic [1:0] exp2;

  initial begin
    pv8 = 0; pm8 = 8'h5a; pv2 = 0; pm2 = 2'b01;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    check(on8 == 8'hff && cnt8 == 8 && lp8 == 0, "reset all on (8)");
    check(on2 == 2'b11 && cnt2 == 2, "reset all on (2)");
    exp8 = 8'hff; exp2 = 2'b11;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      pv8 = ($urandom_range(0, 3) == 0); pm8 = 8'($urandom);
      pv2 = ($urandom_range(0, 3) == 0); pm2 = 2'($urandom);
      #1;
      // the new mask must not show before the clock edge
      check(on8 == exp8 && on2 == exp2, "state before edge");
      @(posedge clk);
      if (pv8) exp8 = pm8;
      if (pv2) exp2 = pm2;
      #1;
      check(on8 == exp8, "bank_on 8");
      check(lp8 == ~exp8, "bank_lp 8");
      check(32'(cnt8) == $countones(exp8), "on_count 8");
      check(on2 == exp2 && lp2 == ~exp2 && 32'(cnt2) == $countones(exp2), "2 banks");
    end
    // reset returns to all on
    @(negedge clk); pv8 = 0; pv2 = 0; rst_n = 0;
    @(posedge clk); #1;
    check(on8 == 8'hff && on2 == 2'b11, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
