// tb_workloads: runs the four stored programs of the processor over every
// operand pair, and replays the worked bench examples of the original design.
//
// Addition, subtraction and the conditional jump are run for all 256
// combinations of the two 4-bit input ports; multiplication for every
// multiplicand with each multiplier 0..3. Expected output-port values are
// plain arithmetic worked out here:
//   addition      D = r1 + r2 (mod 16)
//   subtraction   D = r2 - r1 when r2 > r1, else ~(r1 - r2), the one's
//                 complement of the magnitude left by the end-around carry
//   jump          D = 2*r1 + r1[3] (mod 16) when r1 == r2, else D = r1
//   multiply      D = r1 * k (mod 16) for k = 1..3; k = 0 leaves D unchanged
// Each run must also take three clock cycles per instruction of its program
// (addition 5, subtraction 7, jump 7 or 5, multiply by 0/1/2/3: 1/3/5/6).
//
// The second part replays single instructions from the switches with the
// operand values the original reports for its bench runs (for example
// DCA 0100 -> 0011, CMA 0110 -> 1001, 1100 - 0100 = 1000) and checks this
// design's result for each. Where this design's result differs from the
// reported one (the shifts, and the sign convention of 0101 - 1001), the
// check uses this design's value and the comment states the difference.
module tb_workloads;
  import cpu_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0;
  mode_e      mode = MODE_MANUAL;
  logic [3:0] opcode_sw = 0, port_r1 = 0, port_r2 = 0;
  logic [3:0] out_d, reg_a, reg_b, mem_q, opcode;
  logic       busy, done;
  int checks = 0, failures = 0;
  int runs[5];
  int in_range_products = 0;

  fsm_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Start one run and return the number of busy cycles until done.
  task automatic run(mode_e md, logic [3:0] sw, logic [3:0] r1, logic [3:0] r2,
                     output int cycles);
    cycles = 0;
    @(negedge clk);
    mode = md; opcode_sw = sw; port_r1 = r1; port_r2 = r2; start = 1;
    @(negedge clk); start = 0;
    while (!done && cycles <= 200) begin
      if (busy) cycles++;
      @(negedge clk);
    end
  endtask

  task automatic program_run(mode_e md, logic [3:0] r1, logic [3:0] r2,
                             logic [3:0] exp_d, int n_instr);
    int cycles;
    run(md, 4'b0000, r1, r2, cycles);
    runs[md]++;
    check(cycles == 3 * n_instr && out_d === exp_d,
          $sformatf("%s r1=%b r2=%b: D=%b in %0d cycles, expected %b in %0d",
                    md.name(), r1, r2, out_d, cycles, exp_d, 3 * n_instr));
  endtask

  task automatic manual(logic [3:0] op, logic [3:0] r1, logic [3:0] r2);
    int cycles;
    run(MODE_MANUAL, op, r1, r2, cycles);
    check(cycles == 3, $sformatf("op %b took %0d cycles", op, cycles));
  endtask

  initial begin
    logic [3:0] d_before;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Part 1: the programs over all operands.
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        program_run(MODE_ADD, 4'(x), 4'(y), 4'(x + y), 5);
        program_run(MODE_SUB, 4'(x), 4'(y), (y > x) ? 4'(y - x) : ~4'(x - y), 7);
        if (x == y) program_run(MODE_JUMP, 4'(x), 4'(y), 4'(2 * x + x / 8), 7);
        else        program_run(MODE_JUMP, 4'(x), 4'(y), 4'(x), 5);
      end
    for (int x = 0; x < 16; x++) begin
      d_before = out_d;
      program_run(MODE_MUL, 4'(x), 4'b0000, d_before, 1);
      program_run(MODE_MUL, 4'(x), 4'b0001, 4'(x), 3);
      program_run(MODE_MUL, 4'(x), 4'b0010, 4'(2 * x), 5);
      program_run(MODE_MUL, 4'(x), 4'b0011, 4'(3 * x), 6);
      if (2 * x < 16) in_range_products++;
      if (3 * x < 16) in_range_products++;
    end

    // Part 2: bench examples, one instruction at a time.
    manual(4'b0001, 4'b0100, 0);                  // MOV A,r1: A = 0100
    check(reg_a == 4'b0100, "MOV A,r1 0100");
    manual(4'b1111, 0, 0);                        // DCA: 0100 -> 0011
    check(reg_a == 4'b0011, "DCA 0100 -> 0011");
    manual(4'b0110, 0, 0);                        // STA: memory = 0011
    check(mem_q == 4'b0011, "STA 0011");
    manual(4'b0100, 0, 0);                        // SHR A: 0011 -> 0001 here
    check(reg_a == 4'b0001, "SHR A 0011 -> 0001 (reported 0110)");
    manual(4'b0001, 4'b0110, 0);
    manual(4'b0111, 0, 0);                        // CMA: 0110 -> 1001
    check(reg_a == 4'b1001, "CMA 0110 -> 1001");
    manual(4'b0010, 0, 4'b0100);                  // MOV B,r2: B = 0100
    manual(4'b0101, 0, 0);                        // SHR B: 0100 -> 0010 here
    check(reg_b == 4'b0010, "SHR B 0100 -> 0010 (reported 0110)");
    manual(4'b1101, 0, 0);                        // STB: memory = B
    check(mem_q == 4'b0010, "STB 0010");
    manual(4'b1000, 0, 0);                        // OR A,B: 1001 | 0010
    check(reg_a == 4'b1011, "OR A,B 1001 | 0010 -> 1011");
    manual(4'b0011, 0, 0);                        // MOV D,A
    check(out_d == 4'b1011, "MOV D,A 1011");

    // Subtraction examples: minuend on r2, subtrahend on r1.
    program_run(MODE_SUB, 4'b0100, 4'b1100, 4'b1000, 7);   // 1100 - 0100 = 1000
    // 0101 - 1001: the original quotes 1100 (two's complement of -4); the
    // program as built leaves 1011 (one's complement of -4).
    program_run(MODE_SUB, 4'b1001, 4'b0101, 4'b1011, 7);

    $display("workloads: add %0d, sub %0d, jump %0d, mul %0d runs; %0d in-range products",
             runs[MODE_ADD], runs[MODE_SUB], runs[MODE_JUMP], runs[MODE_MUL],
             in_range_products);
    check(in_range_products == 8 + 6, "products that fit in 4 bits: x <= 7 for x2, x <= 5 for x3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
