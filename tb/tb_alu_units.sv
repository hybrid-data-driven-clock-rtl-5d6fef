// Self-checking testbench of the ten computation circuits.
//
// Feeds every circuit its own random operand pair (with corner values) and
// compares each result with an expression computed here.
module tb_alu_units;
  import alu_pkg::*;
  import tb_alu_ref_pkg::*;

  word_t a [NUNITS];
  word_t b [NUNITS];
  logic  arith;
  word_t res [NUNITS];
  int checks = 0;
  int failures = 0;

  alu_units dut (.a(a), .b(b), .arith(arith), .res(res));

  task automatic check(input int i, input word_t exp);
    checks++;
    if (res[i] !== exp) begin
      failures++;
      $display("FAIL unit %0d a=%h b=%h arith=%b: %h expected %h",
               i, a[i], b[i], arith, res[i], exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < int'(NUNITS); i++) begin
        a[i] = rand_word();
        b[i] = rand_word();
      end
      arith = 1'($urandom_range(0, 1));
      #1;
      check(0, a[0] - b[0]);
      check(1, a[1] + b[1]);
      check(2, a[2] << b[2][4:0]);
      check(3, arith ? 32'($signed(a[3]) >>> b[3][4:0]) : a[3] >> b[3][4:0]);
      check(4, {31'd0, a[4] == b[4]});
      check(5, {31'd0, $signed(a[5]) < $signed(b[5])});
      check(6, {31'd0, a[6] < b[6]});
      check(7, a[7] & b[7]);
      check(8, a[8] | b[8]);
      check(9, a[9] ^ b[9]);
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
