// decoder_3to8: 3-to-8 line decoder with active-low outputs, after the
// 74LS138 used to decode the sequence counter.
//
// With the enables asserted (g1 high, g2a_n and g2b_n low) exactly one output,
// the one numbered by {c, b, a}, is driven low; otherwise all outputs are
// high. This follows the decoder truth table of the original design. The
// address latch (GL input) of the latched variant in that table is left out:
// the decoder named in the parts list has none. Purely combinational.
module decoder_3to8 (
  input  logic       g1,     // active-high enable
  input  logic       g2a_n,  // active-low enable
  input  logic       g2b_n,  // active-low enable
  input  logic       c,      // select, most significant
  input  logic       b,
  input  logic       a,      // select, least significant
  output logic [7:0] y_n     // active-low outputs Y0..Y7
);
  logic [2:0] sel;
  assign sel = {c, b, a};

  always_comb begin
    y_n = 8'hFF;
    if (g1 && !g2a_n && !g2b_n) y_n[sel] = 1'b0;
  end
endmodule
