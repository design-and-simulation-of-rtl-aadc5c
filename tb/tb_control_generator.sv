// tb_control_generator: for all sixteen opcodes and each timing state
// (none, G1, G2, G3) the control word is compared with the operating
// sequence of the instruction set: which register is clocked in which
// state, which buffer drives the bus, and the ALU function.
module tb_control_generator;
  import cpu_pkg::*;
  logic [15:0] m_n;
  logic        g1, g2, g3;
  ctrl_t       ctrl, exp_c;
  int checks = 0, failures = 0;

  control_generator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in(int op, int list[$]);
    foreach (list[i]) if (list[i] == op) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    for (int op = 0; op < 16; op++) begin
      for (int ph = 0; ph < 4; ph++) begin
        m_n = ~(16'h0001 << op);
        {g3, g2, g1} = (ph == 0) ? 3'b000 : 3'(1 << (ph - 1));
        // ALU function per instruction.
        case (op)
          7:       {exp_c.alu_s, exp_c.alu_m, exp_c.alu_cn} = {4'b0000, 1'b1, 1'b1}; // ~A
          8:       {exp_c.alu_s, exp_c.alu_m, exp_c.alu_cn} = {4'b0001, 1'b0, 1'b1}; // A or B
          9:       {exp_c.alu_s, exp_c.alu_m, exp_c.alu_cn} = {4'b1001, 1'b0, 1'b0}; // A+B+1
          10, 11:  {exp_c.alu_s, exp_c.alu_m, exp_c.alu_cn} = {4'b1001, 1'b0, 1'b1}; // A+B
          12, 13:  {exp_c.alu_s, exp_c.alu_m, exp_c.alu_cn} = {4'b1010, 1'b1, 1'b1}; // B
          14:      {exp_c.alu_s, exp_c.alu_m, exp_c.alu_cn} = {4'b0110, 1'b1, 1'b1}; // A xor B
          15:      {exp_c.alu_s, exp_c.alu_m, exp_c.alu_cn} = {4'b1111, 1'b0, 1'b1}; // A-1
          default: {exp_c.alu_s, exp_c.alu_m, exp_c.alu_cn} = {4'b0000, 1'b0, 1'b1}; // A
        endcase
        exp_c.sh_a      = (op == 4);
        exp_c.sh_b      = (op == 5);
        exp_c.b_buf_en  = g1 && op == 2;
        exp_c.mem_rd    = g1 && in(op, '{10, 12});
        exp_c.clk_b     = g1 && in(op, '{2, 5, 9, 10, 12});
        exp_c.clk_c     = g2;
        exp_c.status_ld = g2 && op == 14;
        exp_c.carry_wr  = g2 && op == 11;
        exp_c.a_buf_en  = g3 && op == 1;
        exp_c.c_buf_en  = g3 && !in(op, '{1, 2, 4, 5});
        exp_c.clk_a     = g3 && !in(op, '{0, 2, 5, 13, 14});
        exp_c.clk_d     = g3 && op == 3;
        exp_c.mem_wr    = g3 && in(op, '{6, 13});
        #1;
        checks++;
        if (ctrl !== exp_c) begin
          failures++;
          $display("FAIL op=%0d phase=%0d ctrl=%b expected %b", op, ph, ctrl, exp_c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
