// tb_slot_xbar: self-checking test of a slot crossbar.
//
// Random read-port words, operand selects, results and write-back select; each
// functional unit operand must equal the selected read port and the write
// port must carry the selected unit's result. Runs NUM_FU = 2 (default) and
// NUM_FU = 3, where wb_sel = 3 names no unit and must give zero.
module tb_slot_xbar;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [1:0][31:0] rd_a, rd_b;
  logic [1:0] sa_a, sb_a; logic [1:0][31:0] oa_a, ob_a, res_a; logic wb_a; logic [31:0] wd_a;
  logic [2:0] sa_b, sb_b; logic [2:0][31:0] oa_b, ob_b, res_b; logic [1:0] wb_b; logic [31:0] wd_b;

  slot_xbar #(.NUM_FU(2)) dut2 (.rd_data(rd_a), .opa_sel(sa_a), .opb_sel(sb_a), .fu_opa(oa_a), .fu_opb(ob_a),
                                .fu_result(res_a), .wb_sel(wb_a), .wr_data(wd_a));
  slot_xbar #(.NUM_FU(3)) dut3 (.rd_data(rd_b), .opa_sel(sa_b), .opb_sel(sb_b), .fu_opa(oa_b), .fu_opb(ob_b),
                                .fu_result(res_b), .wb_sel(wb_b), .wr_data(wd_b));

  initial begin
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      rd_a = {$urandom, $urandom}; rd_b = {$urandom, $urandom};
      sa_a = 2'($urandom); sb_a = 2'($urandom); sa_b = 3'($urandom); sb_b = 3'($urandom);
      res_a = {$urandom, $urandom}; res_b = {$urandom, $urandom, $urandom};
      wb_a = 1'($urandom); wb_b = 2'($urandom);
      #1;
      for (int f = 0; f < 2; f++) begin
        check(oa_a[f] == (sa_a[f] ? rd_a[1] : rd_a[0]), "opa fu2");
        check(ob_a[f] == (sb_a[f] ? rd_a[1] : rd_a[0]), "opb fu2");
      end
      for (int f = 0; f < 3; f++) begin
        check(oa_b[f] == (sa_b[f] ? rd_b[1] : rd_b[0]), "opa fu3");
        check(ob_b[f] == (sb_b[f] ? rd_b[1] : rd_b[0]), "opb fu3");
      end
      check(wd_a == (wb_a ? res_a[1] : res_a[0]), "wb fu2");
      check(wd_b == ((wb_b == 3) ? 32'd0 : res_b[wb_b]), "wb fu3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
