// Reference model used by the ALU testbenches: the RISC-V meaning of every
// 5-bit selection code, written independently of the RTL (straight from the
// instruction each code names), with zero for the no-operation code and the
// unassigned codes 30 and 31.
package tb_alu_ref_pkg;

  function automatic logic [31:0] ref_alu(input logic [4:0] sel,
                                          input logic [31:0] a,
                                          input logic [31:0] b);
    logic [4:0] sh;
    sh = b[4:0];
    case (sel)
      5'd1:                          return a - b;                          // sub
      5'd2, 5'd3:                    return 32'($signed(a) >>> sh);         // sra, srai
      5'd4:                          return {31'd0, a == b};                // beq
      5'd5:                          return {31'd0, a != b};                // bne
      5'd6:                          return {31'd0, $signed(a) >= $signed(b)}; // bge
      5'd7:                          return {31'd0, a >= b};                // bgeu
      5'd8, 5'd9, 5'd10:             return {31'd0, $signed(a) < $signed(b)};  // slti, blt, slt
      5'd11, 5'd12, 5'd13:           return {31'd0, a < b};                 // sltiu, bltu, sltu
      5'd14, 5'd15, 5'd16, 5'd17, 5'd18, 5'd19: return a + b;               // lui .. add
      5'd20, 5'd21:                  return a ^ b;                          // xor, xori
      5'd22, 5'd23:                  return a | b;                          // or, ori
      5'd24, 5'd25:                  return a & b;                          // and, andi
      5'd26, 5'd27:                  return a << sh;                        // sll, slli
      5'd28, 5'd29:                  return a >> sh;                        // srl, srli
      default:                       return 32'd0;                          // nop, 30, 31
    endcase
  endfunction

  // Random operand with a bias towards corner values.
  function automatic logic [31:0] rand_word();
    case ($urandom_range(0, 7))
      0:       return 32'h0000_0000;
      1:       return 32'hFFFF_FFFF;
      2:       return 32'h8000_0000;
      3:       return 32'h7FFF_FFFF;
      4:       return 32'($urandom_range(0, 40));
      default: return $urandom();
    endcase
  endfunction

endpackage
