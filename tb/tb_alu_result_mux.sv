// Self-checking testbench of the result multiplexer.
//
// Gives the ten inputs distinct random values and, for every one-hot select,
// the empty select and both values of the invert flag, checks that the output
// is the selected input (bit 0 inverted when asked) or zero.
module tb_alu_result_mux;
  import alu_pkg::*;

  word_t res [NUNITS];
  dec_t  dec;
  word_t y;
  int checks = 0;
  int failures = 0;

  alu_result_mux dut (.res(res), .dec(dec), .y(y));

  initial begin
    word_t exp;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < int'(NUNITS); i++) res[i] = $urandom();
      for (int s = -1; s < int'(NUNITS); s++) begin
        for (int inv = 0; inv < 2; inv++) begin
          dec.unit   = (s < 0) ? '0 : unit_sel_t'(1) << s;
          dec.arith  = 1'($urandom_range(0, 1));
          dec.invert = 1'(inv);
          #1;
          exp = (s < 0) ? '0 : res[s];
          exp[0] = exp[0] ^ 1'(inv);
          checks++;
          if (y !== exp) begin
            failures++;
            $display("FAIL select %0d invert %0d: %h expected %h", s, inv, y, exp);
          end
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
