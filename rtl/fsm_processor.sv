// fsm_processor: a 4-bit processor controlled by a hard-wired finite state
// machine, executing sixteen 4-bit opcodes in three clock cycles each.
//
// Structure: the instruction unit supplies an opcode (from the opcode
// switches, or from one of the instruction-register state machines that step
// through a fixed program); a 4-to-16 decoder turns it into sixteen
// active-low minterms; the sequence counter produces the timing states
// G1, G2, G3; the control generator combines both into the control word of
// the datapath (registers A, B, C, D, ALU, bus buffers, memory unit, status
// register).
// Interface: input ports r1 and r2 and the opcode switches are sampled while
// an instruction runs; out_d is the output port. Pulse `start` for one clock
// with `mode` set; `busy` stays high for 3 cycles per executed instruction
// and `done` pulses once in the cycle after the run.
// Everything runs on one clock; the clock source (an astable 555 timer in the
// original, at 80 MHz) is outside this module.
module fsm_processor
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,       // asynchronous active-low reset
  input  mode_e      mode,        // instruction source
  input  logic       start,       // start switch (one-cycle pulse)
  input  logic [3:0] opcode_sw,   // opcode switches (manual mode)
  input  logic [3:0] port_r1,     // input port r1
  input  logic [3:0] port_r2,     // input port r2
  output logic [3:0] out_d,       // output port (register D)
  output logic [3:0] reg_a,       // probe: register A
  output logic [3:0] reg_b,       // probe: register B
  output logic [3:0] mem_q,       // probe: memory unit
  output logic [3:0] opcode,      // opcode being executed
  output logic       busy,
  output logic       done
);
  logic [2:0]  g;
  logic        instr_end, status;
  logic [15:0] m_n;
  ctrl_t       ctrl;

  instruction_unit u_iu (
    .clk, .rst_n, .mode, .start, .sw_opcode(opcode_sw), .multiplier(port_r2[1:0]),
    .status, .instr_end, .opcode, .busy, .done
  );

  sequence_counter #(.STEPS(3)) u_seq (
    .clk, .rst_n, .enable(busy), .g(g), .last(instr_end)
  );

  decoder_4to16 u_dec (.g1_n(1'b0), .g2_n(1'b0), .code(opcode), .m_n(m_n));

  control_generator u_ctl (.m_n(m_n), .g1(g[0]), .g2(g[1]), .g3(g[2]), .ctrl(ctrl));

  datapath u_dp (
    .clk, .rst_n, .ctrl, .port_r1, .port_r2,
    .reg_a, .reg_b, .reg_c(), .reg_d(out_d), .mem_q, .status
  );
endmodule
