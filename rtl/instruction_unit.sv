// instruction_unit: supplies the opcode that the processor executes and
// starts and stops runs.
//
// In manual mode the opcode comes from the opcode switches: a start pulse
// executes that one instruction. In program mode one of the
// instruction-register state machines (ir_fsm) supplies the opcodes: start
// clears it to 0000 (HLT) and it then steps once per instruction until it has
// executed its stop state 0011 (MOV D,A). Multiplication uses three state
// machines, for multiplier 1, 2 and 3; the multiplier (bits 1:0 of input
// port r2) enables exactly one of them and their outputs are ORed onto the
// decoder input, so the disabled ones must output 0000. With multiplier 0
// none is enabled: the decoder sees HLT, which runs once and ends the run.
// Mode, multiplier and switch opcode are sampled at start and held for the
// whole run.
// Interface: `instr_end` is the last timing state of an instruction (G3);
// `busy` enables the sequence counter; `done` is a one-cycle pulse in the
// cycle after a run ends. A start while busy is ignored.
// The state machines, the ORing of the multiplication machines and the
// start switch follow the original design; the handshake (start, busy,
// done) and the sampling of the switches are this design's choices.
module instruction_unit
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mode_e      mode,        // instruction source
  input  logic       start,       // start switch
  input  logic [3:0] sw_opcode,   // opcode switches
  input  logic [1:0] multiplier,  // multiplier for MODE_MUL
  input  logic       status,      // status register (A == B)
  input  logic       instr_end,   // last timing state of the instruction
  output logic [3:0] opcode,      // opcode to the decoder
  output logic       busy,
  output logic       done
);
  mode_e      mode_q, mode_sel;
  logic [1:0] mul_q, mul_sel;
  logic [3:0] sw_q;
  logic       launch, stop, advance;
  logic [3:0] op_add, op_sub, op_jump, op_mul1, op_mul2, op_mul3, prog_op;
  logic       en_add, en_sub, en_jump, en_mul1, en_mul2, en_mul3;

  assign launch   = start && !busy;
  assign mode_sel = busy ? mode_q : mode;
  assign mul_sel  = busy ? mul_q : multiplier;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_MANUAL;
      mul_q  <= '0;
      sw_q   <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= busy && instr_end && stop;
      if (launch) begin
        mode_q <= mode;
        mul_q  <= multiplier;
        sw_q   <= sw_opcode;
        busy   <= 1'b1;
      end else if (busy && instr_end && stop) begin
        busy <= 1'b0;
      end
    end
  end

  assign en_add  = mode_sel == MODE_ADD;
  assign en_sub  = mode_sel == MODE_SUB;
  assign en_jump = mode_sel == MODE_JUMP;
  assign en_mul1 = mode_sel == MODE_MUL && mul_sel == 2'd1;
  assign en_mul2 = mode_sel == MODE_MUL && mul_sel == 2'd2;
  assign en_mul3 = mode_sel == MODE_MUL && mul_sel == 2'd3;

  assign advance = busy && instr_end && !stop;

  ir_fsm #(.PROG(PROG_ADD)) u_ir_add (
    .clk, .rst_n, .enable(en_add), .clear(launch), .advance, .status, .state(), .opcode(op_add));
  ir_fsm #(.PROG(PROG_SUB)) u_ir_sub (
    .clk, .rst_n, .enable(en_sub), .clear(launch), .advance, .status, .state(), .opcode(op_sub));
  ir_fsm #(.PROG(PROG_JUMP)) u_ir_jump (
    .clk, .rst_n, .enable(en_jump), .clear(launch), .advance, .status, .state(), .opcode(op_jump));
  ir_fsm #(.PROG(PROG_MUL1)) u_ir_mul1 (
    .clk, .rst_n, .enable(en_mul1), .clear(launch), .advance, .status, .state(), .opcode(op_mul1));
  ir_fsm #(.PROG(PROG_MUL2)) u_ir_mul2 (
    .clk, .rst_n, .enable(en_mul2), .clear(launch), .advance, .status, .state(), .opcode(op_mul2));
  ir_fsm #(.PROG(PROG_MUL3)) u_ir_mul3 (
    .clk, .rst_n, .enable(en_mul3), .clear(launch), .advance, .status, .state(), .opcode(op_mul3));

  // The OR gates in front of the decoder: disabled machines output 0000.
  assign prog_op = op_add | op_sub | op_jump | op_mul1 | op_mul2 | op_mul3;

  always_comb begin
    if (mode_sel == MODE_MANUAL)    stop = 1'b1;
    else if (mode_sel == MODE_MUL && mul_sel == 2'd0) stop = 1'b1;
    else                            stop = (prog_op == STOP_STATE);
  end

  assign opcode = (mode_sel == MODE_MANUAL) ? (busy ? sw_q : sw_opcode) : prog_op;

  // At most one state machine is enabled at a time.
  a_one_ir: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({en_add, en_sub, en_jump, en_mul1, en_mul2, en_mul3}))
    else $error("instruction_unit: several state machines enabled");
endmodule
