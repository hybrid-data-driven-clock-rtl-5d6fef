// End-to-end self-checking testbench of the low power ALU (default sizes).
//
// Drives bursts of random operations (all 30 assigned selection codes, plus
// the unassigned ones) separated by idle periods (alu_selection = 0), with
// inputs changed on the falling clock edge. A cycle model written here
// predicts the ALU's registers: at rising edge k the registers load exactly
// when alu_selection was non-zero at edge k or k-1, the input registers take
// the inputs and alu_out takes the RISC-V result of the previously loaded
// operation. After every edge the testbench compares alu_out with the model,
// checks that the gated clock had a rising edge exactly when the model
// loads, and checks that only the selected computation circuit sees operand
// data. It counts each mechanism (gated idle cycles, the flush edge after a
// burst, resumption after idle, data gating of the nine idle circuits, each
// circuit, inverted comparisons) and fails if one never happened.
module tb_alu_hybrid;
  import alu_pkg::*;
  import tb_alu_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  word_t      reg_op1 = '0;
  word_t      reg_op2 = '0;
  logic [4:0] alu_selection = '0;
  word_t      alu_out;

  int checks = 0;
  int failures = 0;

  alu_hybrid dut (
    .clk           (clk),
    .rst_n         (rst_n),
    .reg_op1       (reg_op1),
    .reg_op2       (reg_op2),
    .alu_selection (alu_selection),
    .alu_out       (alu_out)
  );

  always #5 clk = ~clk;

  int g_edges = 0;
  always @(posedge dut.clk_g) g_edges++;

  // mechanism counters
  int n_gated = 0, n_flush = 0, n_resume = 0, n_datagate = 0, n_invert = 0;
  int n_code [32];
  int n_unit [NUNITS];

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %0t: %s", $time, msg);
  endtask

  initial begin
    #2_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // model state
    logic [4:0] m_sel;
    word_t      m_op1, m_op2, m_out;
    logic       en_prev;
    logic       load;
    int         g0;
    int         burst;
    logic [4:0] s;
    word_t      exp_next;

    foreach (n_code[i]) n_code[i] = 0;
    foreach (n_unit[i]) n_unit[i] = 0;

    m_sel = '0; m_op1 = '0; m_op2 = '0; m_out = '0;
    en_prev = 1'b0;

    repeat (3) @(negedge clk);
    checks++;
    if (alu_out !== '0) fail("alu_out not cleared by reset");
    rst_n = 1'b1;

    for (int k = 0; k < 20000; k++) begin
      // choose this cycle's inputs (we are just after a falling edge)
      if (k % 64 < 40) begin
        // busy: mostly operations, some single idle cycles
        if ($urandom_range(0, 9) == 0) s = 5'd0;
        else                           s = 5'($urandom_range(1, 31));
      end else if (k % 64 < 44) begin
        s = 5'($urandom_range(1, 31));   // short burst after the long idle
      end else begin
        s = ($urandom_range(0, 5) == 0) ? 5'($urandom_range(1, 31)) : 5'd0;
      end
      // idle cycles also change the operands: they must not reach the ALU
      alu_selection = s;
      reg_op1 = rand_word();
      reg_op2 = rand_word();

      load = (s != 0) || en_prev;
      if (load) begin
        exp_next = ref_alu(m_sel, m_op1, m_op2);
        m_out = exp_next;
        if (m_sel == 0 && s != 0 && !en_prev) n_resume++;
        m_sel = s;
        m_op1 = reg_op1;
        m_op2 = reg_op2;
      end
      if (s == 0 && en_prev)  n_flush++;
      if (s == 0 && !en_prev) n_gated++;
      if (s != 0) n_code[s]++;

      g0 = g_edges;
      @(posedge clk);
      #1;
      // data gating: only the selected circuit sees data
      for (int i = 0; i < int'(NUNITS); i++) begin
        checks++;
        if (dut.dec.unit[i]) begin
          n_unit[i]++;
          if (dut.op1_g[i] !== m_op1 || dut.op2_g[i] !== m_op2)
            fail($sformatf("selected circuit %0d does not get the operands", i));
        end else begin
          if (dut.op1_g[i] !== '0 || dut.op2_g[i] !== '0)
            fail($sformatf("idle circuit %0d sees data", i));
          else if (m_sel != 0 && (m_op1 != 0 || m_op2 != 0)) n_datagate++;
        end
      end
      if (dut.dec.invert) n_invert++;

      @(negedge clk);
      checks++;
      if ((g_edges - g0) != int'(load))
        fail($sformatf("cycle %0d: %0d gated clock edges, expected %0d (sel %0d, previous enable %b)",
                       k, g_edges - g0, int'(load), s, en_prev));
      checks++;
      if (alu_out !== m_out)
        fail($sformatf("cycle %0d: alu_out=%h expected %h", k, alu_out, m_out));
      en_prev = (s != 0);
    end

    // every mechanism must have happened
    checks++;
    if (n_gated == 0 || n_flush == 0 || n_resume == 0 || n_datagate == 0 || n_invert == 0)
      fail($sformatf("mechanism never seen: gated=%0d flush=%0d resume=%0d datagate=%0d invert=%0d",
                     n_gated, n_flush, n_resume, n_datagate, n_invert));
    for (int c = 1; c < 32; c++) begin
      checks++;
      if (n_code[c] == 0) fail($sformatf("selection code %0d never issued", c));
    end
    for (int i = 0; i < int'(NUNITS); i++) begin
      checks++;
      if (n_unit[i] == 0) fail($sformatf("computation circuit %0d never selected", i));
    end
    $display("gated idle cycles=%0d flush edges=%0d resumptions=%0d inverted compares=%0d",
             n_gated, n_flush, n_resume, n_invert);
    $display("idle-circuit gating events=%0d", n_datagate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
