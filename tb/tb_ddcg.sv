// Self-checking testbench of the data driven clock gate.
//
// Drives a random enable pattern (changed on the falling clock edge) and
// checks, cycle by cycle: in the high clock phase after each rising edge clk_g
// equals the enable sampled at that edge (FF1 follows the enable);
// clk_g has a rising edge in a cycle exactly when the enable was high at this
// edge or the previous one; clk_g is never high while clk is low; clk_en
// pulses only in cycles where the enable changed or had changed the cycle
// before. Counts gated, running and switching cycles and requires each.
module tb_ddcg;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic clk_en, clk_g;

  int checks = 0;
  int failures = 0;
  int n_gated = 0, n_run = 0, n_switch = 0;
  int g_edges = 0, en_edges = 0;

  ddcg dut (.clk(clk), .rst_n(rst_n), .enable(enable), .clk_en(clk_en), .clk_g(clk_g));

  always #5 clk = ~clk;

  always @(posedge clk_g)  g_edges++;
  always @(posedge clk_en) en_edges++;

  // clk_g may only be high while clk is high.
  always @(clk_g or clk) begin
    #0;
    if (clk_g && !clk) begin
      failures++;
      $display("FAIL clk_g high while clk low at %0t", $time);
    end
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_prev, en_now, en_prev2;
    int g0, e0;
    en_prev = 1'b0;
    en_prev2 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 600; k++) begin
      // long runs of each value, with some single-cycle toggles
      if (k < 4)        en_now = 1'b0;
      else if (k < 8)   en_now = 1'b1;
      else if (k < 10)  en_now = 1'b0;
      else              en_now = ($urandom_range(0, 3) == 0) ? ~enable : enable;
      enable = en_now;
      g0 = g_edges;
      e0 = en_edges;
      @(posedge clk);
      #1;
      checks++;
      if (clk_g !== en_now) begin
        failures++;
        $display("FAIL cycle %0d: clk_g=%b in the high phase, enable=%b", k, clk_g, en_now);
      end
      @(negedge clk);
      checks++;
      if ((g_edges - g0) != int'(en_now | en_prev)) begin
        failures++;
        $display("FAIL cycle %0d: %0d clk_g edges, enable now %b before %b",
                 k, g_edges - g0, en_now, en_prev);
      end
      checks++;
      if ((en_edges - e0) > int'((en_now ^ en_prev) | (en_prev ^ en_prev2))) begin
        failures++;
        $display("FAIL cycle %0d: unexpected clk_en pulse", k);
      end
      if (!en_now && !en_prev) n_gated++;
      if (en_now) n_run++;
      if (en_now != en_prev) n_switch++;
      en_prev2 = en_prev;
      en_prev = en_now;
    end
    checks++;
    if (n_gated == 0 || n_run == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL coverage gated=%0d run=%0d switch=%0d", n_gated, n_run, n_switch);
    end
    $display("gated cycles=%0d running cycles=%0d enable changes=%0d", n_gated, n_run, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
