// Self-checking testbench of the data gating stage.
//
// For random operands and every one-hot select (and the all-zero select),
// checks that the selected computation circuit receives both operands
// unchanged and every other circuit receives zeros, and that the arithmetic
// shift flag reaches the shifter only when the shifter is selected.
module tb_alu_data_gate;
  import alu_pkg::*;

  word_t op1, op2;
  dec_t  dec;
  word_t op1_g [NUNITS];
  word_t op2_g [NUNITS];
  logic  arith_g;
  int checks = 0;
  int failures = 0;

  alu_data_gate dut (.op1(op1), .op2(op2), .dec(dec),
                     .op1_g(op1_g), .op2_g(op2_g), .arith_g(arith_g));

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int s = -1; s < int'(NUNITS); s++) begin
        op1 = $urandom();
        op2 = $urandom();
        dec.unit   = (s < 0) ? '0 : unit_sel_t'(1) << s;
        dec.arith  = 1'($urandom_range(0, 1));
        dec.invert = 1'($urandom_range(0, 1));
        #1;
        for (int i = 0; i < int'(NUNITS); i++) begin
          checks++;
          if (i == s) begin
            if (op1_g[i] !== op1 || op2_g[i] !== op2) begin
              failures++;
              $display("FAIL selected unit %0d did not get the operands", i);
            end
          end else if (op1_g[i] !== '0 || op2_g[i] !== '0) begin
            failures++;
            $display("FAIL unit %0d not selected but sees data (select %0d)", i, s);
          end
        end
        checks++;
        if (arith_g !== (dec.arith && s == 3)) begin
          failures++;
          $display("FAIL arith_g=%b select=%0d arith=%b", arith_g, s, dec.arith);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
