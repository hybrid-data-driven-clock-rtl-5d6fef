// Low power RISC-V ALU with hybrid data driven clock gating and data gating.
//
// The ALU computes one of the RISC-V integer operations on two 32-bit operands,
// chosen by the 5-bit alu_selection code (see alu_pkg::alu_sel_e). Two power
// saving techniques are combined, as in the published design:
//   * clock gating: every register of the ALU (reg_op1, reg_op2, the
//     selection register and alu_out) is clocked by clk_g from a data driven
//     clock gate (ddcg) whose enable is the OR of the alu_selection bits, so
//     the ALU receives no clock while the selection is zero (idle);
//   * data gating: the registered selection is decoded to a one-hot select
//     and AND gates pass the registered operands only to the computation
//     circuit that is selected; the others see zeros.
// The result multiplexer then drives the alu_out register.
//
// Interface: clk, asynchronous active-low rst_n (this design's addition; it
// clears all registers), reg_op1, reg_op2, alu_selection, alu_out.
//
// Timing: drive the inputs away from the rising clock edge. An operation
// presented at rising edge k (alu_selection non-zero) is loaded into the input
// registers at that edge, and its result appears on alu_out after edge k+1.
// A register loads at edge k exactly when alu_selection was non-zero at edge
// k or at edge k-1: the clock gate runs the registers once more at the first
// idle edge, which loads the last result into alu_out and a zero selection
// into the selection register. During idle cycles alu_out holds its value.
// When work resumes after an idle period, the first loaded alu_out is that of
// the zero selection, i.e. 0, followed by the new results.
//
// Circuit note: the registers are clocked by a generated clock (clk_g); that
// is the technique this design implements.
module alu_hybrid
  import alu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  word_t            reg_op1,
  input  word_t            reg_op2,
  input  logic [SEL_W-1:0] alu_selection,
  output word_t            alu_out
);

  logic             enable;
  logic             clk_en;
  logic             clk_g;
  word_t            op1_q;
  word_t            op2_q;
  logic [SEL_W-1:0] sel_q;
  dec_t             dec;
  word_t            op1_g [NUNITS];
  word_t            op2_g [NUNITS];
  logic             arith_g;
  word_t            res   [NUNITS];
  word_t            result;

  // Idle detection: OR of the selection bits.
  assign enable = |alu_selection;

  ddcg u_ddcg (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (enable),
    .clk_en (clk_en),
    .clk_g  (clk_g)
  );

  // Input registers on the gated clock.
  always_ff @(posedge clk_g or negedge rst_n) begin
    if (!rst_n) begin
      op1_q <= '0;
      op2_q <= '0;
      sel_q <= '0;
    end else begin
      op1_q <= reg_op1;
      op2_q <= reg_op2;
      sel_q <= alu_selection;
    end
  end

  alu_decoder u_dec (
    .sel (sel_q),
    .dec (dec)
  );

  alu_data_gate u_gate (
    .op1     (op1_q),
    .op2     (op2_q),
    .dec     (dec),
    .op1_g   (op1_g),
    .op2_g   (op2_g),
    .arith_g (arith_g)
  );

  alu_units u_units (
    .a     (op1_g),
    .b     (op2_g),
    .arith (arith_g),
    .res   (res)
  );

  alu_result_mux u_mux (
    .res (res),
    .dec (dec),
    .y   (result)
  );

  // Output register on the gated clock.
  always_ff @(posedge clk_g or negedge rst_n) begin
    if (!rst_n) alu_out <= '0;
    else        alu_out <= result;
  end

  // At most one computation circuit receives data.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dec.unit))
    else $error("more than one computation circuit selected");

endmodule
