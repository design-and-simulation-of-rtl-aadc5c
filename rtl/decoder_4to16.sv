// decoder_4to16: 4-to-16 opcode decoder with active-low outputs, after the
// 4-to-16 decoder/demultiplexer of the control signal generator.
//
// Output m_n[i] is the active-low minterm m_i of the opcode: with both
// active-low enables low, exactly the output numbered by the opcode is low.
// The control signal generator builds every control signal from these
// minterms with NAND gates (De Morgan form), which is why the outputs keep
// the active-low polarity of the original part. Purely combinational.
module decoder_4to16 (
  input  logic        g1_n,    // active-low enable
  input  logic        g2_n,    // active-low enable
  input  logic [3:0]  code,    // opcode, bit 3 most significant
  output logic [15:0] m_n      // active-low minterms m0..m15
);
  always_comb begin
    m_n = 16'hFFFF;
    if (!g1_n && !g2_n) m_n[code] = 1'b0;
  end
endmodule
