// tb_instruction_unit: a run of every mode (manual, addition, subtraction,
// jump taken and not taken, multiplication by 0..3) with a three-cycle
// instruction timing emulated here. The opcodes seen at the end of each
// instruction are compared with the program listing; the run must last
// exactly 3 cycles per instruction and end with one done pulse. A start
// while busy must be ignored.
module tb_instruction_unit;
  import cpu_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0, status = 0;
  mode_e      mode = MODE_MANUAL;
  logic [3:0] sw_opcode = 0, opcode;
  logic [1:0] multiplier = 0;
  logic       instr_end, busy, done;
  int         phase = 0;
  int checks = 0, failures = 0;

  instruction_unit dut (.*);

  always #5 clk = ~clk;

  // Three timing states per instruction while busy.
  assign instr_end = busy && phase == 2;
  always_ff @(posedge clk) phase <= !busy ? 0 : (phase == 2 ? 0 : phase + 1);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(mode_e md, logic [1:0] mul, logic st, logic [3:0] sw, logic [3:0] exp_ops[$]);
    logic [3:0] seen[$];
    int cycles = 0, dones = 0;
    @(negedge clk);
    mode = md; multiplier = mul; status = st; sw_opcode = sw; start = 1;
    @(negedge clk); start = 0;
    // Change the switches during the run: they must have been sampled.
    mode = MODE_MANUAL; multiplier = 2'd0; sw_opcode = ~sw;
    while (busy) begin
      if (cycles == 4) start = 1;   // ignored while busy
      if (instr_end) seen.push_back(opcode);
      cycles++;
      @(negedge clk);
      start = 0;
      if (done) dones++;
      if (cycles > 100) break;
    end
    @(negedge clk); if (done) dones++;
    check(seen == exp_ops, $sformatf("mode %s mul %0d: opcodes %p expected %p", md.name(), mul, seen, exp_ops));
    check(cycles == 3 * exp_ops.size(), $sformatf("mode %s: %0d cycles, expected %0d", md.name(), cycles, 3 * exp_ops.size()));
    check(dones == 1, $sformatf("mode %s: %0d done pulses", md.name(), dones));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(MODE_MANUAL, 0, 0, 4'b1001, '{4'b1001});
    run(MODE_MANUAL, 0, 0, 4'b0110, '{4'b0110});
    run(MODE_ADD,  0, 0, 0, '{4'b0000, 4'b0001, 4'b0010, 4'b1011, 4'b0011});
    run(MODE_SUB,  0, 0, 0, '{4'b0000, 4'b0010, 4'b0001, 4'b0111, 4'b1011, 4'b1010, 4'b0011});
    run(MODE_JUMP, 0, 1, 0, '{4'b0000, 4'b0001, 4'b0010, 4'b1110, 4'b1011, 4'b1010, 4'b0011});
    run(MODE_JUMP, 0, 0, 0, '{4'b0000, 4'b0001, 4'b0010, 4'b1110, 4'b0011});
    run(MODE_MUL,  0, 0, 0, '{4'b0000});
    run(MODE_MUL,  1, 0, 0, '{4'b0000, 4'b0001, 4'b0011});
    run(MODE_MUL,  2, 0, 0, '{4'b0000, 4'b0001, 4'b0110, 4'b1010, 4'b0011});
    run(MODE_MUL,  3, 0, 0, '{4'b0000, 4'b0001, 4'b0110, 4'b1010, 4'b1011, 4'b0011});
    // A second addition run restarts from HLT.
    run(MODE_ADD,  0, 0, 0, '{4'b0000, 4'b0001, 4'b0010, 4'b1011, 4'b0011});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
