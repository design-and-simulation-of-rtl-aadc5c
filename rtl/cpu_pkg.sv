// cpu_pkg: types and constants shared by the 4-bit micro-code processor.
//
// The processor executes sixteen 4-bit opcodes (the code assignment below is
// the one of the original design). Every instruction takes three clock
// cycles, the timing states G1, G2 and G3; in each of them at most one of the
// registers B, C, A/D is clocked. The control word carries every control
// signal as an active-high enable: the original TTL circuit used active-low
// decoder outputs and gated register clocks, here the register clock becomes
// a synchronous clock enable.
package cpu_pkg;

  // Opcode assignment of the sixteen instructions.
  typedef enum logic [3:0] {
    OP_HLT     = 4'b0000,
    OP_MOV_AR1 = 4'b0001,  // A <- input port r1
    OP_MOV_BR2 = 4'b0010,  // B <- input port r2
    OP_MOV_DA  = 4'b0011,  // D <- A (output port)
    OP_SHR_A   = 4'b0100,  // arithmetic shift right of A
    OP_SHR_B   = 4'b0101,  // arithmetic shift right of B
    OP_STA     = 4'b0110,  // memory <- A
    OP_CMA     = 4'b0111,  // A <- ~A
    OP_OR_AB   = 4'b1000,  // A <- A | B
    OP_INC_A   = 4'b1001,  // A <- A + 1
    OP_ADD_A   = 4'b1010,  // B <- memory, A <- A + B
    OP_ADD_AB  = 4'b1011,  // A <- A + B, memory <- carry
    OP_LDA     = 4'b1100,  // B <- memory, A <- B
    OP_STB     = 4'b1101,  // memory <- B
    OP_JNZ     = 4'b1110,  // status <- (A == B); program branches on it
    OP_DCA     = 4'b1111   // A <- A - 1
  } opcode_e;

  // Source of the opcode that is executed.
  typedef enum logic [2:0] {
    MODE_MANUAL = 3'd0,  // opcode switches, one instruction per start
    MODE_ADD    = 3'd1,  // addition program (5 states)
    MODE_SUB    = 3'd2,  // subtraction program (7 states)
    MODE_JUMP   = 3'd3,  // conditional jump program
    MODE_MUL    = 3'd4   // multiplication by 0..3 (three state machines)
  } mode_e;

  // Programs wired into the instruction-register state machines.
  typedef enum logic [2:0] {
    PROG_ADD  = 3'd0,
    PROG_SUB  = 3'd1,
    PROG_JUMP = 3'd2,
    PROG_MUL1 = 3'd3,
    PROG_MUL2 = 3'd4,
    PROG_MUL3 = 3'd5
  } prog_e;

  // Every program stops on MOV D,A (it then holds that state).
  localparam logic [3:0] STOP_STATE = 4'b0011;

  // Control word produced by the control signal generator.
  typedef struct packed {
    logic [3:0] alu_s;     // ALU function select S3..S0
    logic       alu_m;     // ALU mode: 1 = logic, 0 = arithmetic
    logic       alu_cn;    // ALU carry-in pin Cn: 1 = no carry (active-high data)
    logic       a_buf_en;  // switch buffer r1 onto the bus
    logic       b_buf_en;  // switch buffer r2 onto the bus
    logic       c_buf_en;  // register C output buffer onto the bus
    logic       mem_rd;    // memory output buffer onto the bus
    logic       mem_wr;    // memory <- bus
    logic       carry_wr;  // memory <- ALU carry out (ADD A,B)
    logic       clk_a;     // register A clock enable
    logic       clk_b;     // register B clock enable
    logic       clk_c;     // register C clock enable
    logic       clk_d;     // register D clock enable
    logic       sh_a;      // register A: 1 = shift, 0 = load
    logic       sh_b;      // register B: 1 = shift, 0 = load
    logic       status_ld; // status register <- (A == B)
  } ctrl_t;

endpackage
