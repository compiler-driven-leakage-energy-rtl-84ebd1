// tb_leakage_workloads: the leakage experiment on the banked register file.
//
// Eight register-pressure profiles stand for the evaluated applications:
//   0 adpcm_decode  12 live registers     4 blowfishencode 60
//   1 g721_decode   12                    5 epic           14
//   2 mesa_texgen   60                    6 sha            28
//   3 aes           60                    7 mpeg2decode   127 (all usable)
// Each profile runs on 2-, 4- and 8-bank files (128 x 32-bit, 4 slots). The
// powered fraction of bank-cycles, which is the leakage energy relative to
// an always-on file, must match the expected level for every configuration:
//   profile       2 banks  4 banks  8 banks
//   <=15 live      0.50     0.25     0.125
//   28 live        0.50     0.25     0.25
//   60 live        0.50     0.50     0.50
//   127 live       1.00     1.00     1.00
// The averages over the eight profiles come out at 0.5625, 0.4375 and
// 0.390625. The live-register counts are chosen to produce these levels; the
// applications themselves are not run.
module tb_leakage_workloads;
  logic clk = 0, start = 0;
  always #5 clk = ~clk;
  logic d2, d4, d8;
  int c2, c4, c8, f2, f4, f8;
  int checks = 0, failures = 0;

  leakage_bench #(.NB(2)) u2 (.clk, .start, .done(d2), .checks(c2), .failures(f2));
  leakage_bench #(.NB(4)) u4 (.clk, .start, .done(d4), .checks(c4), .failures(f4));
  leakage_bench #(.NB(8)) u8 (.clk, .start, .done(d8), .checks(c8), .failures(f8));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c8, f2 + f4 + f8 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    start = 1;
    wait (d2 && d4 && d8);
    checks = c2 + c4 + c8; failures = f2 + f4 + f8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
