// Shared types and constants of the low power RISC-V ALU.
//
// XLEN is the operand and result width (32) and SEL_W the width of the
// alu_selection code (5). alu_sel_e lists the 30 selection codes: code 0 is
// the no-operation code that lets the ALU go idle, codes 1..29 name the RISC-V
// instruction that the ALU serves. Codes 30 and 31 are not assigned; this
// design treats them like a no-operation (result zero) that still keeps the
// clock running, because they are non-zero.
//
// unit_e numbers the ten computation circuits; a unit_sel_t holds one bit per
// circuit and is one-hot (or all zero) after decoding. dec_t is what the
// selection decoder produces: the one-hot unit select, the arithmetic flag of
// the right shifter and the invert flag applied to comparison results.
package alu_pkg;

  parameter int unsigned XLEN   = 32;
  parameter int unsigned SEL_W  = 5;
  parameter int unsigned NUNITS = 10;

  typedef enum logic [SEL_W-1:0] {
    SEL_NOP   = 5'd0,
    SEL_SUB   = 5'd1,
    SEL_SRA   = 5'd2,
    SEL_SRAI  = 5'd3,
    SEL_BEQ   = 5'd4,
    SEL_BNE   = 5'd5,
    SEL_BGE   = 5'd6,
    SEL_BGEU  = 5'd7,
    SEL_SLTI  = 5'd8,
    SEL_BLT   = 5'd9,
    SEL_SLT   = 5'd10,
    SEL_SLTIU = 5'd11,
    SEL_BLTU  = 5'd12,
    SEL_SLTU  = 5'd13,
    SEL_LUI   = 5'd14,
    SEL_AUIPC = 5'd15,
    SEL_JAL   = 5'd16,
    SEL_JALR  = 5'd17,
    SEL_ADDI  = 5'd18,
    SEL_ADD   = 5'd19,
    SEL_XOR   = 5'd20,
    SEL_XORI  = 5'd21,
    SEL_OR    = 5'd22,
    SEL_ORI   = 5'd23,
    SEL_AND   = 5'd24,
    SEL_ANDI  = 5'd25,
    SEL_SLL   = 5'd26,
    SEL_SLLI  = 5'd27,
    SEL_SRL   = 5'd28,
    SEL_SRLI  = 5'd29,
    SEL_RSV30 = 5'd30,
    SEL_RSV31 = 5'd31
  } alu_sel_e;

  typedef enum int unsigned {
    U_SUB = 0,
    U_ADD = 1,
    U_SHL = 2,
    U_SHR = 3,
    U_EQ  = 4,
    U_LTS = 5,
    U_LTU = 6,
    U_AND = 7,
    U_OR  = 8,
    U_XOR = 9
  } unit_e;

  typedef logic [NUNITS-1:0] unit_sel_t;
  typedef logic [XLEN-1:0]   word_t;

  typedef struct packed {
    unit_sel_t unit;    // one-hot select of the computation circuit
    logic      arith;   // right shift is arithmetic (sra, srai)
    logic      invert;  // comparison result is inverted (bne, bge, bgeu)
  } dec_t;

endpackage
