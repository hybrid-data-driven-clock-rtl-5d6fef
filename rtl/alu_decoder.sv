// Selection decoder of the ALU.
//
// Turns the registered 5-bit alu_selection code into a one-hot select of the
// ten computation circuits (sub, add, shl, shr, eq, lts, ltu, and, or, xor).
// The grouping of codes onto circuits follows the ALU's function table: every
// add-type instruction (lui, auipc, jal, jalr, addi, add) uses the adder, every
// signed comparison (slti, blt, slt, bge) the signed less-than circuit, every
// unsigned one (sltiu, bltu, sltu, bgeu) the unsigned less-than circuit, beq
// and bne the equality circuit. Two control bits go with the select: `arith`
// makes the right shifter arithmetic (sra, srai) and `invert` inverts a
// comparison result (bne, bge, bgeu), as the RISC-V branch conditions need;
// these two bits and the result of the unassigned codes 0, 30 and 31 (no
// circuit selected) are this design's choices.
//
// Purely combinational; its select bus drives the data gating AND gates and
// the result multiplexer.
module alu_decoder
  import alu_pkg::*;
(
  input  logic [SEL_W-1:0] sel,
  output dec_t             dec
);

  always_comb begin
    dec = '0;
    unique case (alu_sel_e'(sel))
      SEL_SUB:                       dec.unit[U_SUB] = 1'b1;
      SEL_SRA, SEL_SRAI: begin
                                     dec.unit[U_SHR] = 1'b1;
                                     dec.arith       = 1'b1;
      end
      SEL_SRL, SEL_SRLI:             dec.unit[U_SHR] = 1'b1;
      SEL_SLL, SEL_SLLI:             dec.unit[U_SHL] = 1'b1;
      SEL_BEQ:                       dec.unit[U_EQ]  = 1'b1;
      SEL_BNE: begin
                                     dec.unit[U_EQ]  = 1'b1;
                                     dec.invert      = 1'b1;
      end
      SEL_BGE: begin
                                     dec.unit[U_LTS] = 1'b1;
                                     dec.invert      = 1'b1;
      end
      SEL_BGEU: begin
                                     dec.unit[U_LTU] = 1'b1;
                                     dec.invert      = 1'b1;
      end
      SEL_SLTI, SEL_BLT, SEL_SLT:    dec.unit[U_LTS] = 1'b1;
      SEL_SLTIU, SEL_BLTU, SEL_SLTU: dec.unit[U_LTU] = 1'b1;
      SEL_LUI, SEL_AUIPC, SEL_JAL, SEL_JALR, SEL_ADDI, SEL_ADD:
                                     dec.unit[U_ADD] = 1'b1;
      SEL_XOR, SEL_XORI:             dec.unit[U_XOR] = 1'b1;
      SEL_OR,  SEL_ORI:              dec.unit[U_OR]  = 1'b1;
      SEL_AND, SEL_ANDI:             dec.unit[U_AND] = 1'b1;
      default:                       dec = '0;  // nop and unassigned codes
    endcase
  end

endmodule
