// Self-checking testbench of the ALU selection decoder.
//
// Walks through all 32 selection codes and compares the one-hot unit select
// and the arith/invert flags with a table written here from the RISC-V
// meaning of each instruction code.
module tb_alu_decoder;
  import alu_pkg::*;

  logic [4:0] sel;
  dec_t       dec;
  int checks = 0;
  int failures = 0;

  alu_decoder dut (.sel(sel), .dec(dec));

  // expected: unit index (-1 for none), arith, invert
  function automatic void expect_of(input int code, output int unit,
                                    output bit arith, output bit invert);
    arith = 0;
    invert = 0;
    case (code)
      1:                   unit = 0;                 // sub
      2, 3:                begin unit = 3; arith = 1; end  // sra
      4:                   unit = 4;                 // beq
      5:                   begin unit = 4; invert = 1; end // bne
      6:                   begin unit = 5; invert = 1; end // bge
      7:                   begin unit = 6; invert = 1; end // bgeu
      8, 9, 10:            unit = 5;                 // slti blt slt
      11, 12, 13:          unit = 6;                 // sltiu bltu sltu
      14, 15, 16, 17, 18, 19: unit = 1;              // add group
      20, 21:              unit = 9;                 // xor
      22, 23:              unit = 8;                 // or
      24, 25:              unit = 7;                 // and
      26, 27:              unit = 2;                 // sll
      28, 29:              unit = 3;                 // srl
      default:             unit = -1;
    endcase
  endfunction

  initial begin
    int u;
    bit ar, inv;
    logic [9:0] exp_unit;
    for (int c = 0; c < 32; c++) begin
      sel = 5'(c);
      #1;
      expect_of(c, u, ar, inv);
      exp_unit = (u < 0) ? 10'd0 : 10'(1) << u;
      checks++;
      if (dec.unit !== exp_unit || dec.arith !== ar || dec.invert !== inv) begin
        failures++;
        $display("FAIL code %0d: unit=%b arith=%b invert=%b expected %b %b %b",
                 c, dec.unit, dec.arith, dec.invert, exp_unit, ar, inv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
