// ir_fsm: one instruction-register state machine.
//
// The instruction register is a non-binary synchronous counter whose state
// *is* the opcode of the instruction being executed; its next-state table
// spells out one program. PROG selects the table:
//   PROG_ADD  : 0000 -> 0001 -> 0010 -> 1011 -> 0011        (r1 + r2)
//   PROG_SUB  : 0000 -> 0010 -> 0001 -> 0111 -> 1011 -> 1010 -> 0011
//                                                   (r2 - r1, end-around carry)
//   PROG_JUMP : 0000 -> 0001 -> 0010 -> 1110 -> {status ? 1011 : 0011},
//               1011 -> 1010 -> 0011
//   PROG_MUL1 : 0000 -> 0001 -> 0011                      (r1 * 1)
//   PROG_MUL2 : 0000 -> 0001 -> 0110 -> 1010 -> 0011      (r1 * 2)
//   PROG_MUL3 : 0000 -> 0001 -> 0110 -> 1010 -> 1011 -> 0011  (r1 * 3)
// Every table holds in the stop state 0011 (MOV D,A) and sends every state
// it does not use to 0001, so a corrupted state recovers. The addition and
// subtraction tables are the original design's state tables; the jump and
// multiplication sequences are this design's reading of the printed
// programs.
// Interface: `clear` restarts at 0000 (HLT); `advance` (end of an
// instruction) moves to the next state; both act on the rising edge only
// while `enable` is high. `opcode` is the state, forced to 0000 while the
// machine is disabled so several machines can be ORed onto one decoder.
module ir_fsm
  import cpu_pkg::*;
#(
  parameter prog_e PROG = PROG_ADD
) (
  input  logic       clk,
  input  logic       rst_n,    // asynchronous active-low reset to 0000
  input  logic       enable,   // this machine drives the decoder
  input  logic       clear,    // restart the program at 0000
  input  logic       advance,  // current instruction has finished
  input  logic       status,   // status register (for JNZ)
  output logic [3:0] state,    // current state, ungated
  output logic [3:0] opcode    // state gated by enable
);
  logic [3:0] next;

  always_comb begin
    next = 4'b0001;
    unique case (PROG)
      PROG_ADD:
        case (state)
          4'b0000: next = 4'b0001;
          4'b0001: next = 4'b0010;
          4'b0010: next = 4'b1011;
          4'b1011: next = 4'b0011;
          4'b0011: next = 4'b0011;
          default: next = 4'b0001;
        endcase
      PROG_SUB:
        case (state)
          4'b0000: next = 4'b0010;
          4'b0010: next = 4'b0001;
          4'b0001: next = 4'b0111;
          4'b0111: next = 4'b1011;
          4'b1011: next = 4'b1010;
          4'b1010: next = 4'b0011;
          4'b0011: next = 4'b0011;
          default: next = 4'b0001;
        endcase
      PROG_JUMP:
        case (state)
          4'b0000: next = 4'b0001;
          4'b0001: next = 4'b0010;
          4'b0010: next = 4'b1110;
          4'b1110: next = status ? 4'b1011 : 4'b0011;
          4'b1011: next = 4'b1010;
          4'b1010: next = 4'b0011;
          4'b0011: next = 4'b0011;
          default: next = 4'b0001;
        endcase
      PROG_MUL1:
        case (state)
          4'b0000: next = 4'b0001;
          4'b0001: next = 4'b0011;
          4'b0011: next = 4'b0011;
          default: next = 4'b0001;
        endcase
      PROG_MUL2:
        case (state)
          4'b0000: next = 4'b0001;
          4'b0001: next = 4'b0110;
          4'b0110: next = 4'b1010;
          4'b1010: next = 4'b0011;
          4'b0011: next = 4'b0011;
          default: next = 4'b0001;
        endcase
      PROG_MUL3:
        case (state)
          4'b0000: next = 4'b0001;
          4'b0001: next = 4'b0110;
          4'b0110: next = 4'b1010;
          4'b1010: next = 4'b1011;
          4'b1011: next = 4'b0011;
          4'b0011: next = 4'b0011;
          default: next = 4'b0001;
        endcase
      default: next = 4'b0001;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  state <= 4'b0000;
    else if (enable && clear)    state <= 4'b0000;
    else if (enable && advance)  state <= next;
  end

  assign opcode = enable ? state : 4'b0000;
endmodule
