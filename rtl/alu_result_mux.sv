// Result multiplexer of the ALU.
//
// Picks the result of the one computation circuit named by the decoded,
// one-hot select (an AND-OR multiplexer) and, for bne, bge and bgeu, inverts
// the comparison bit. With no circuit selected (no-operation and the
// unassigned codes) the result is zero; that value and the inversion are this
// design's choices. Purely combinational; its output feeds the alu_out
// register.
module alu_result_mux
  import alu_pkg::*;
(
  input  word_t res [NUNITS],
  input  dec_t  dec,
  output word_t y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < NUNITS; i++) begin
      y |= res[i] & {XLEN{dec.unit[i]}};
    end
    y[0] = y[0] ^ dec.invert;
  end

endmodule
