// storage_register: the memory unit, a single 4-bit word of flip-flops.
//
// `wr` stores the bus value (STA, STB); `carry_wr` stores the ALU carry as
// the word 000c (ADD A,B: the subtraction program later adds it back with
// ADD A). Both are synchronous to the rising clock edge; if both are high the
// bus write wins. The word is read through the memory output buffer, which
// sits in bus_buffers. Reset clears the word.
// The single-word flip-flop memory and the carry storage follow the original
// design; the encoding of the stored carry is this design's choice.
module storage_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,     // asynchronous active-low reset
  input  logic             wr,        // store the bus value
  input  logic             carry_wr,  // store the carry as 000c
  input  logic [WIDTH-1:0] d,
  input  logic             carry,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (wr)       q <= d;
    else if (carry_wr) q <= {{(WIDTH-1){1'b0}}, carry};
  end
endmodule
