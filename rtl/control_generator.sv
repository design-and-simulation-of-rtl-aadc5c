// control_generator: the hard-wired control signal generator.
//
// Inputs are the sixteen active-low opcode minterms m_n[i] from the 4-to-16
// decoder and the three timing states G1..G3 from the sequence register.
// Every control signal is a NAND of the minterms that need it (De Morgan:
// the OR of active-low minterms), gated with the timing state in which it
// acts. Each instruction runs as
//   G1: register B is clocked   (MOV B,r2; SHR B; INC A; ADD A; LDA)
//   G2: register C <- ALU F     (every instruction); status / carry capture
//   G3: register A (and D, memory) is clocked from the bus or shifted
// The ALU select equations for S3, S1 and M, the buffer and clock terms and
// the G1/G2/G3 gating follow the original design. The S0 and S2 terms of
// JNZ, the carry input of INC A, the carry capture of ADD A,B and the
// exclusion of STB and JNZ from the A clock are this design's own reading
// (see the design notes). Purely combinational.
module control_generator
  import cpu_pkg::*;
(
  input  logic [15:0] m_n,   // active-low opcode minterms
  input  logic        g1,    // timing state G1
  input  logic        g2,    // timing state G2
  input  logic        g3,    // timing state G3
  output ctrl_t       ctrl
);
  always_comb begin
    // ALU function select: OR of the minterms, written as a NAND of the
    // active-low decoder outputs.
    ctrl.alu_s[3] = ~&{m_n[9], m_n[10], m_n[11], m_n[12], m_n[13], m_n[15]};
    ctrl.alu_s[2] = ~&{m_n[14], m_n[15]};
    ctrl.alu_s[1] = ~&{m_n[12], m_n[13], m_n[14], m_n[15]};
    ctrl.alu_s[0] = ~&{m_n[8], m_n[9], m_n[10], m_n[11], m_n[15]};
    ctrl.alu_m    = ~&{m_n[7], m_n[12], m_n[13], m_n[14]};
    ctrl.alu_cn   = m_n[9];                // carry in only for INC A

    // G1: register B and the buffers that feed it.
    ctrl.b_buf_en = g1 & ~m_n[2];
    ctrl.mem_rd   = g1 & ~&{m_n[10], m_n[12]};
    ctrl.clk_b    = g1 & ~&{m_n[2], m_n[5], m_n[9], m_n[10], m_n[12]};
    ctrl.sh_b     = ~m_n[5];

    // G2: register C takes the ALU result for every instruction.
    ctrl.clk_c     = g2;
    ctrl.status_ld = g2 & ~m_n[14];
    ctrl.carry_wr  = g2 & ~m_n[11];

    // G3: register A, register D and the memory write.
    ctrl.a_buf_en = g3 & ~m_n[1];
    ctrl.c_buf_en = g3 & (&{m_n[1], m_n[2], m_n[4], m_n[5]});
    ctrl.clk_a    = g3 & (&{m_n[0], m_n[2], m_n[5], m_n[13], m_n[14]});
    ctrl.sh_a     = ~m_n[4];
    ctrl.clk_d    = g3 & ~m_n[3];
    ctrl.mem_wr   = g3 & ~&{m_n[6], m_n[13]};
  end
endmodule
