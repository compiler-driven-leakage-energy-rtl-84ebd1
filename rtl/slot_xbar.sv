// slot_xbar: full crossbar between one VLIW issue slot's register-file ports
// and the functional units of that slot.
//
// Each slot owns two read ports and one write port of the shared register
// file, and every functional unit of the slot can reach all three. Operand A
// and operand B of functional unit f each pick either read port
// (opa_sel[f]/opb_sel[f]: 0 = read port 0, 1 = read port 1); the write port
// carries the result of the functional unit named by wb_sel. Purely
// combinational.
//
// The two-read/one-write ports per slot and the full crossbar follow the
// architecture; the number of functional units per slot (NUM_FU) is not fixed
// by it and defaults to 2 here.
module slot_xbar #(
  parameter int unsigned NUM_FU = 2,
  parameter int unsigned DATA_W = rf_pkg::DATA_W,
  localparam int unsigned SW    = (NUM_FU > 1) ? $clog2(NUM_FU) : 1
) (
  input  logic [1:0][DATA_W-1:0]        rd_data,
  input  logic [NUM_FU-1:0]             opa_sel,
  input  logic [NUM_FU-1:0]             opb_sel,
  output logic [NUM_FU-1:0][DATA_W-1:0] fu_opa,
  output logic [NUM_FU-1:0][DATA_W-1:0] fu_opb,
  input  logic [NUM_FU-1:0][DATA_W-1:0] fu_result,
  input  logic [SW-1:0]                 wb_sel,
  output logic [DATA_W-1:0]             wr_data
);
  always_comb begin
    for (int f = 0; f < NUM_FU; f++) begin
      fu_opa[f] = rd_data[opa_sel[f]];
      fu_opb[f] = rd_data[opb_sel[f]];
    end
    wr_data = (32'(wb_sel) < NUM_FU) ? fu_result[wb_sel] : '0;
  end
endmodule
