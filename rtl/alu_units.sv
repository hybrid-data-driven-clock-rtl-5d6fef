// The ten computation circuits of the ALU.
//
// Each circuit works on its own operand pair (a[i], b[i]), which the data
// gating stage sets to zero when the circuit is not selected:
//   sub  a - b              add  a + b
//   shl  a << b[4:0]        shr  a >> b[4:0], arithmetic when `arith` is set
//   eq   a == b             lts  signed a < signed b      ltu  a < b
//   and  a & b              or   a | b                    xor  a ^ b
// The operations are those of the ALU's function table; the comparison
// circuits return their one-bit answer in bit 0 of a zero-extended word, which
// is this design's choice. Purely combinational; results are indexed by
// alu_pkg::unit_e.
module alu_units
  import alu_pkg::*;
(
  input  word_t a   [NUNITS],
  input  word_t b   [NUNITS],
  input  logic  arith,
  output word_t res [NUNITS]
);

  localparam int unsigned SHW = $clog2(XLEN);

  logic signed [XLEN:0] shr_ext;

  assign shr_ext = $signed({arith & a[U_SHR][XLEN-1], a[U_SHR]});

  assign res[U_SUB] = a[U_SUB] - b[U_SUB];
  assign res[U_ADD] = a[U_ADD] + b[U_ADD];
  assign res[U_SHL] = a[U_SHL] << b[U_SHL][SHW-1:0];
  assign res[U_SHR] = XLEN'(shr_ext >>> b[U_SHR][SHW-1:0]);
  assign res[U_EQ]  = word_t'(a[U_EQ] == b[U_EQ]);
  assign res[U_LTS] = word_t'($signed(a[U_LTS]) < $signed(b[U_LTS]));
  assign res[U_LTU] = word_t'(a[U_LTU] < b[U_LTU]);
  assign res[U_AND] = a[U_AND] & b[U_AND];
  assign res[U_OR]  = a[U_OR]  | b[U_OR];
  assign res[U_XOR] = a[U_XOR] ^ b[U_XOR];

endmodule
