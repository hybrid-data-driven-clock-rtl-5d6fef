// Data gating of the ALU's computation circuits.
//
// One pair of AND gates per computation circuit: circuit i receives reg_op1
// and reg_op2 only when its bit of the decoded select is 1, and zeros
// otherwise, so the nine circuits that are not selected see constant inputs
// and do not toggle. This follows the published data gating scheme (AND gates
// in front of every circuit, driven by the decoded selection). The arithmetic
// shift flag goes through the same gating for the right shifter.
//
// Purely combinational. Outputs are arrays indexed by alu_pkg::unit_e.
module alu_data_gate
  import alu_pkg::*;
(
  input  word_t     op1,
  input  word_t     op2,
  input  dec_t      dec,
  output word_t     op1_g [NUNITS],
  output word_t     op2_g [NUNITS],
  output logic      arith_g
);

  for (genvar i = 0; i < NUNITS; i++) begin : g_gate
    assign op1_g[i] = op1 & {XLEN{dec.unit[i]}};
    assign op2_g[i] = op2 & {XLEN{dec.unit[i]}};
  end

  assign arith_g = dec.arith & dec.unit[U_SHR];

endmodule
