// tb_fsm_processor: end-to-end test of the processor at its default size.
//
// Part 1 executes 600 random instructions from the opcode switches with
// random input ports and compares registers A, B, D and the memory unit
// after each one with an instruction-level reference model. Part 2 runs the
// stored programs with random operands and checks the output port against
// the arithmetic result: addition r1 + r2, subtraction r2 - r1 (one's
// complement result when negative, see the design notes), the conditional
// jump (taken when r1 == r2) and multiplication of r1 by 0..3. Every run
// must take exactly three clock cycles per executed instruction. The test
// counts each mechanism (every opcode, both JNZ outcomes, both stored carry
// values, each program, a sign-propagating shift) and fails one that never
// happened.
module tb_fsm_processor;
  import cpu_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0;
  mode_e      mode = MODE_MANUAL;
  logic [3:0] opcode_sw = 0, port_r1 = 0, port_r2 = 0;
  logic [3:0] out_d, reg_a, reg_b, mem_q, opcode;
  logic       busy, done;
  int checks = 0, failures = 0;

  // Reference state.
  logic [3:0] ra, rb, rd, rm;
  logic       rs;

  // Mechanism counters.
  int op_count[16];
  int jump_taken = 0, jump_not_taken = 0, carry_one = 0, carry_zero = 0;
  int sign_shift = 0, status_one = 0;
  int prog_runs[5];

  fsm_processor dut (.*);

  always #5 clk = ~clk;   // clock period is arbitrary (80 MHz in the original)

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Instruction-level reference model.
  task automatic ref_exec(logic [3:0] op, logic [3:0] r1, logic [3:0] r2);
    logic [4:0] sum;
    case (op)
      4'b0001: ra = r1;
      4'b0010: rb = r2;
      4'b0011: rd = ra;
      4'b0100: begin if (ra[3]) sign_shift++; ra = {ra[3], ra[3:1]}; end
      4'b0101: begin if (rb[3]) sign_shift++; rb = {rb[3], rb[3:1]}; end
      4'b0110: rm = ra;
      4'b0111: ra = ~ra;
      4'b1000: ra = ra | rb;
      4'b1001: begin rb = 4'b0000; ra = ra + 4'd1; end
      4'b1010: begin rb = rm; ra = ra + rb; end
      4'b1011: begin
        sum = {1'b0, ra} + {1'b0, rb};
        ra = sum[3:0]; rm = {3'b000, sum[4]};
        if (sum[4]) carry_one++; else carry_zero++;
      end
      4'b1100: begin rb = rm; ra = rm; end
      4'b1101: rm = rb;
      4'b1110: begin rs = (ra == rb); if (rs) status_one++; end
      4'b1111: ra = ra - 4'd1;
      default: ;
    endcase
  endtask

  // Pulse start and count the busy cycles and the opcodes until done.
  task automatic do_run(mode_e md, logic [3:0] sw, logic [3:0] r1, logic [3:0] r2,
                        output int cycles, output logic [3:0] ops[$]);
    cycles = 0;
    ops.delete();
    @(negedge clk);
    mode = md; opcode_sw = sw; port_r1 = r1; port_r2 = r2; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      if (busy) begin
        cycles++;
        if (ops.size() == 0 || (cycles % 3) == 1) ops.push_back(opcode);
      end
      @(negedge clk);
      if (cycles > 200) break;
    end
  endtask

  task automatic manual(logic [3:0] op, logic [3:0] r1, logic [3:0] r2);
    int cycles;
    logic [3:0] ops[$];
    do_run(MODE_MANUAL, op, r1, r2, cycles, ops);
    ref_exec(op, r1, r2);
    op_count[op]++;
    check(cycles == 3, $sformatf("op %b took %0d cycles", op, cycles));
    check({reg_a, reg_b, out_d, mem_q} === {ra, rb, rd, rm},
          $sformatf("op %b r1=%h r2=%h: A%h B%h D%h M%h expected A%h B%h D%h M%h",
                    op, r1, r2, reg_a, reg_b, out_d, mem_q, ra, rb, rd, rm));
  endtask

  task automatic run_program(mode_e md, logic [3:0] r1, logic [3:0] r2, logic [3:0] exp_d, int n_instr);
    int cycles;
    logic [3:0] ops[$];
    logic [3:0] d_before;
    d_before = out_d;
    do_run(md, 4'b0000, r1, r2, cycles, ops);
    prog_runs[md]++;
    foreach (ops[i]) if (i > 0 && ops[i-1] == 4'b1110) begin
      if (ops[i] == 4'b1011) jump_taken++; else jump_not_taken++;
    end
    check(cycles == 3 * n_instr, $sformatf("%s r1=%h r2=%h: %0d cycles, expected %0d",
                                           md.name(), r1, r2, cycles, 3 * n_instr));
    check(out_d === exp_d, $sformatf("%s r1=%h r2=%h: D=%h expected %h (ops %p)",
                                     md.name(), r1, r2, out_d, exp_d, ops));
  endtask

  initial begin
    logic [3:0] x, y;
    {ra, rb, rd, rm, rs} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Part 1: random instructions from the switches.
    for (int i = 0; i < 600; i++)
      manual(4'($urandom), 4'($urandom), 4'($urandom));
    // Make sure every opcode and both status values occur.
    for (int op = 0; op < 16; op++) manual(4'(op), 4'($urandom), 4'($urandom));
    manual(4'b0001, 4'h6, 0); manual(4'b0010, 0, 4'h6); manual(4'b1110, 0, 0);

    // Part 2: the programs.
    for (int i = 0; i < 40; i++) begin
      x = 4'($urandom); y = 4'($urandom);
      run_program(MODE_ADD, x, y, x + y, 5);
      // Subtraction r2 - r1: exact when r2 > r1 (end-around carry), else the
      // one's complement of the magnitude.
      run_program(MODE_SUB, x, y, (y > x) ? y - x : ~(x - y), 7);
      // Jump: taken when r1 == r2 (A + B, then plus the stored carry),
      // otherwise straight to MOV D,A, so D = r1.
      if (i % 2 == 0) y = x;
      run_program(MODE_JUMP, x, y, (x == y) ? 4'(x + x + 4'(x[3])) : x, (x == y) ? 7 : 5);
      // Multiplication r1 * m, m = r2[1:0], multiplicand within the 4-bit range.
      x = 4'($urandom);
      run_program(MODE_MUL, x, 4'b0001, x, 3);
      x = 4'($urandom_range(0, 7));
      run_program(MODE_MUL, x, 4'b0010, 4'(2 * x), 5);
      x = 4'($urandom_range(0, 5));
      run_program(MODE_MUL, x, 4'b0111, 4'(3 * x), 6);   // only r2[1:0] counts
      run_program(MODE_MUL, x, 4'b0000, out_d, 1);        // by zero: D unchanged
    end

    // Every mechanism must have happened.
    for (int op = 0; op < 16; op++)
      check(op_count[op] > 0, $sformatf("opcode %b never executed", op));
    check(jump_taken > 0,     "JNZ never taken");
    check(jump_not_taken > 0, "JNZ never fell through");
    check(carry_one > 0,      "ADD A,B never stored a carry of 1");
    check(carry_zero > 0,     "ADD A,B never stored a carry of 0");
    check(sign_shift > 0,     "no shift of a negative value");
    check(status_one > 0,     "status never set by JNZ");
    for (int md = 0; md < 5; md++)
      if (md != 0) check(prog_runs[md] > 0, $sformatf("mode %0d never run", md));
    $display("mechanisms: jnz taken %0d, fell through %0d, carry 1/0 %0d/%0d, sign shifts %0d",
             jump_taken, jump_not_taken, carry_one, carry_zero, sign_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
