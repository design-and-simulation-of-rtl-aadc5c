// alu_74181: 4-bit arithmetic logic unit / function generator with the
// function table of the 74LS181 (active-high data convention).
//
// S3..S0 pick one of sixteen functions, M chooses logic (M = 1) or arithmetic
// (M = 0). Each bit forms two terms
//   x = A | (B & S0) | (~B & S1)        y = (A & ~B & S2) | (A & B & S3)
// In arithmetic mode F = x plus y plus carry, which yields the datasheet
// entries (S = 1001: A plus B, S = 1111: A minus 1, S = 0110: A minus B
// minus 1, ...). In logic mode F = ~(x ^ y) (S = 0000: ~A, S = 1010: B,
// S = 0110: A xor B, ...). As on the real part, in this data convention the
// carry input Cn and the carry output Cn+4 are active low: cn = 1 means no
// carry in, cn4 = 0 means a carry out. aeqb is high when F is all ones.
// The carry look-ahead outputs P and G are not provided (nothing uses them).
// The part and its control inputs are those of the original design; the
// function table is the part's published one. Purely combinational.
module alu_74181 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,     // function select S3..S0
  input  logic       m,     // 1 = logic, 0 = arithmetic
  input  logic       cn,    // carry in, active low
  output logic [3:0] f,
  output logic       cn4,   // carry out, active low
  output logic       aeqb   // F == 4'b1111
);
  logic [3:0] x, y;
  logic [4:0] sum;

  always_comb begin
    x   = a | (b & {4{s[0]}}) | (~b & {4{s[1]}});
    y   = (a & ~b & {4{s[2]}}) | (a & b & {4{s[3]}});
    sum = {1'b0, x} + {1'b0, y} + {4'b0, ~cn};
    f   = m ? ~(x ^ y) : sum[3:0];
  end

  assign cn4  = ~sum[4];
  assign aeqb = &f;
endmodule
