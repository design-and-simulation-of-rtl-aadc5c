// shift_register_4b: 4-bit parallel-access register with a shift-right mode,
// in the role of the 74LS195 used for the processor registers.
//
// On a rising clock edge with `clk_en` high the register either loads `d`
// (sh_ld_n = 0, "load") or shifts right arithmetically (sh_ld_n = 1,
// "shift": the sign bit is kept and copied into bit 2, bit 0 drops out).
// With `clk_en` low it holds. The gated register clock of the original
// circuit becomes the synchronous clock enable here; the reset is an
// asynchronous clear to zero, as on the 74LS195.
// Interface: q is the register contents, available one cycle after the edge.
// The shift/load control and the arithmetic shift right follow the original
// design; the bit ordering (bit 3 = most significant) is this design's.
module shift_register_4b #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,    // asynchronous active-low clear
  input  logic             clk_en,   // clock the register this cycle
  input  logic             sh_ld_n,  // 1 = shift right, 0 = parallel load
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (clk_en) q <= sh_ld_n ? {q[WIDTH-1], q[WIDTH-1:1]} : d;
  end
endmodule
