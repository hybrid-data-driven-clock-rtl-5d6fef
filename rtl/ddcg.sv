// Data driven clock gate.
//
// Produces a gated clock clk_g that runs only while `enable` is high, without
// the glitches of a plain AND gate. FF1 holds the enable that is in force; it
// is not clocked by clk but by clk_en = clk AND Q2. FF2 samples, on every
// rising edge of clk, whether the enable differs from FF1 (enable XOR Q1), so
// FF1 is only clocked in the cycle where the enable changes. The gated clock
// is clk AND Q1. The structure (FF1, FF2, one XOR and two AND gates) follows
// the published circuit; the asynchronous active-low reset that clears FF1 and
// FF2 is this design's choice (the circuit starts with both Q outputs at 0).
//
// Timing: `enable` must be stable around the rising edge of clk. With enable
// sampled high at a rising edge, Q2 and then Q1 rise right after that edge and
// clk_g delivers a pulse in that same clock period. After the first rising
// edge at which enable is sampled low, Q1 falls and clk_g stays low. In a
// zero-delay simulation the edge at which the enable is first seen low still
// gives clk_g a rising edge, because Q1 falls only after clk has risen; in
// silicon this is a pulse as wide as the FF2 and FF1 clock-to-output delays
// plus the AND delay. The ALU built on this gate relies on it to load its
// output register once more after the last operation.
//
// Circuit note: clk_en and clk_g are generated clocks (an AND of clk and a
// flip-flop output); that is the technique itself.
module ddcg (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic clk_en,
  output logic clk_g
);

  logic q1;  // FF1: enable in force
  logic q2;  // FF2: enable differs from FF1
  logic d2;

  assign d2     = enable ^ q1;
  assign clk_en = clk & q2;
  assign clk_g  = clk & q1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q2 <= 1'b0;
    else        q2 <= d2;
  end

  always_ff @(posedge clk_en or negedge rst_n) begin
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= enable;
  end

endmodule
