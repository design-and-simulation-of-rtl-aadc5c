// tb_ir_fsm: steps each program of the instruction-register state machine
// from its cleared state and compares the opcode sequence with the program
// listing; checks the hold in the stop state, both branches of JNZ, that a
// disabled machine outputs 0000 and does not move, and that clear restarts.
module tb_ir_fsm;
  import cpu_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, advance = 0, status = 0;
  logic [5:0] enable = '0;
  logic [3:0] state [6];
  logic [3:0] opcode [6];
  int checks = 0, failures = 0;

  ir_fsm #(.PROG(PROG_ADD))  u0 (.clk, .rst_n, .enable(enable[0]), .clear, .advance, .status, .state(state[0]), .opcode(opcode[0]));
  ir_fsm #(.PROG(PROG_SUB))  u1 (.clk, .rst_n, .enable(enable[1]), .clear, .advance, .status, .state(state[1]), .opcode(opcode[1]));
  ir_fsm #(.PROG(PROG_JUMP)) u2 (.clk, .rst_n, .enable(enable[2]), .clear, .advance, .status, .state(state[2]), .opcode(opcode[2]));
  ir_fsm #(.PROG(PROG_MUL1)) u3 (.clk, .rst_n, .enable(enable[3]), .clear, .advance, .status, .state(state[3]), .opcode(opcode[3]));
  ir_fsm #(.PROG(PROG_MUL2)) u4 (.clk, .rst_n, .enable(enable[4]), .clear, .advance, .status, .state(state[4]), .opcode(opcode[4]));
  ir_fsm #(.PROG(PROG_MUL3)) u5 (.clk, .rst_n, .enable(enable[5]), .clear, .advance, .status, .state(state[5]), .opcode(opcode[5]));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(int idx, logic [3:0] exp_op);
    checks++;
    if (opcode[idx] !== exp_op) begin
      failures++;
      $display("FAIL machine %0d opcode=%b expected %b", idx, opcode[idx], exp_op);
    end
    for (int j = 0; j < 6; j++) if (j != idx) begin
      checks++;
      if (opcode[j] !== 4'b0000) begin
        failures++;
        $display("FAIL disabled machine %0d drives %b", j, opcode[j]);
      end
    end
  endtask

  // Clear machine idx and step it through the expected program (the last
  // entry is the stop state, which must then hold).
  task automatic run(int idx, logic [3:0] prog[$], logic st);
    @(negedge clk);
    enable = 6'b1 << idx; status = st; clear = 1;
    @(negedge clk); clear = 0;
    foreach (prog[i]) begin
      #1 expect_op(idx, prog[i]);
      advance = 1; @(negedge clk); advance = 0;
    end
    #1 expect_op(idx, prog[prog.size() - 1]);   // holds in the stop state
    // Disabled: the state must not move.
    enable = '0; advance = 1; @(negedge clk); advance = 0;
    checks++;
    if (state[idx] !== prog[prog.size() - 1]) begin
      failures++; $display("FAIL machine %0d moved while disabled", idx);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, '{4'b0000, 4'b0001, 4'b0010, 4'b1011, 4'b0011}, 1'b0);                       // Table 4.8
    run(1, '{4'b0000, 4'b0010, 4'b0001, 4'b0111, 4'b1011, 4'b1010, 4'b0011}, 1'b0);     // Table 4.9
    run(2, '{4'b0000, 4'b0001, 4'b0010, 4'b1110, 4'b1011, 4'b1010, 4'b0011}, 1'b1);     // jump taken
    run(2, '{4'b0000, 4'b0001, 4'b0010, 4'b1110, 4'b0011}, 1'b0);                       // not taken
    run(3, '{4'b0000, 4'b0001, 4'b0011}, 1'b0);
    run(4, '{4'b0000, 4'b0001, 4'b0110, 4'b1010, 4'b0011}, 1'b0);
    run(5, '{4'b0000, 4'b0001, 4'b0110, 4'b1010, 4'b1011, 4'b0011}, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
