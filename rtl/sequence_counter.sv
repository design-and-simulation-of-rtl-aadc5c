// sequence_counter: the sequence register that splits every instruction into
// the three timing states G1, G2 and G3.
//
// A 4-bit synchronous counter (in the role of the 74LS160 decade counter)
// counts 0, 1, ..., STEPS-1 while `enable` is high and is cleared
// synchronously after the last step; a 3-to-8 decoder (74LS138) turns the
// count into one timing signal per state. The counter rests at 0 while
// `enable` is low, so the first cycle of every run is G1. `last` marks the
// final state of an instruction (G3 at the default STEPS = 3).
//
// Timing: g[k] is high during the (k+1)-th cycle of each instruction; the
// instruction occupies STEPS consecutive clock cycles.
// The three-cycle instruction comes from the original design; the reset
// value and the rest-at-zero behaviour are this design's choice.
module sequence_counter #(
  parameter int unsigned STEPS = 3   // timing states per instruction (2..8)
) (
  input  logic             clk,
  input  logic             rst_n,    // asynchronous active-low reset
  input  logic             enable,   // count (an instruction is running)
  output logic [STEPS-1:0] g,        // one-hot timing states, g[0] = G1
  output logic             last      // final timing state of the instruction
);
  logic [3:0] count_q;
  logic [7:0] y_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        count_q <= '0;
    else if (!enable)                  count_q <= '0;
    else if (count_q == 4'(STEPS - 1)) count_q <= '0;
    else                               count_q <= count_q + 4'd1;
  end

  decoder_3to8 u_dec (
    .g1(enable), .g2a_n(1'b0), .g2b_n(count_q[3]),
    .c(count_q[2]), .b(count_q[1]), .a(count_q[0]),
    .y_n(y_n)
  );

  assign g    = ~y_n[STEPS-1:0];
  assign last = g[STEPS-1];

  initial assert (STEPS >= 2 && STEPS <= 8) else $error("STEPS must be 2..8");
endmodule
