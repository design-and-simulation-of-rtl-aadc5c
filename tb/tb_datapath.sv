// tb_datapath: random control words (at most one bus driver per cycle, any
// ALU function, any combination of register clocks) applied to the
// datapath; a reference model built from the 74181 function table and the
// register-transfer rules is compared with registers A, B, C, D, the memory
// unit and the status register after every clock.
module tb_datapath;
  import cpu_pkg::*;
  logic       clk = 0, rst_n = 0;
  ctrl_t      ctrl;
  logic [3:0] port_r1 = 0, port_r2 = 0;
  logic [3:0] reg_a, reg_b, reg_c, reg_d, mem_q;
  logic       status;
  logic [3:0] ra, rb, rc, rd, rm, bus, f;
  logic       rs, carry;
  int checks = 0, failures = 0, status_ones = 0, carry_ones = 0;

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 74181 (active-high data): function F and carry out for S, M, Cn.
  task automatic alu_ref(input logic [3:0] a, b, s, input logic m, cn,
                         output logic [3:0] fo, output logic co);
    logic [4:0] p, q, t;
    case (s)
      4'd0:  begin p = {1'b0, a};      q = 5'd0;           end
      4'd1:  begin p = {1'b0, a | b};  q = 5'd0;           end
      4'd2:  begin p = {1'b0, a | ~b}; q = 5'd0;           end
      4'd3:  begin p = 5'd0;           q = 5'b01111;       end
      4'd4:  begin p = {1'b0, a};      q = {1'b0, a & ~b}; end
      4'd5:  begin p = {1'b0, a | b};  q = {1'b0, a & ~b}; end
      4'd6:  begin p = {1'b0, a};      q = {1'b0, ~b};     end
      4'd7:  begin p = {1'b0, a & ~b}; q = 5'b01111;       end
      4'd8:  begin p = {1'b0, a};      q = {1'b0, a & b};  end
      4'd9:  begin p = {1'b0, a};      q = {1'b0, b};      end
      4'd10: begin p = {1'b0, a | ~b}; q = {1'b0, a & b};  end
      4'd11: begin p = {1'b0, a & b};  q = 5'b01111;       end
      4'd12: begin p = {1'b0, a};      q = {1'b0, a};      end
      4'd13: begin p = {1'b0, a | b};  q = {1'b0, a};      end
      4'd14: begin p = {1'b0, a | ~b}; q = {1'b0, a};      end
      default: begin p = {1'b0, a};    q = 5'b01111;       end
    endcase
    t  = p + q + (cn ? 5'd0 : 5'd1);
    co = t[4];
    if (!m) fo = t[3:0];
    else case (s)
      4'd0: fo = ~a;       4'd1: fo = ~(a | b);  4'd2: fo = ~a & b;   4'd3: fo = 4'b0;
      4'd4: fo = ~(a & b); 4'd5: fo = ~b;        4'd6: fo = a ^ b;    4'd7: fo = a & ~b;
      4'd8: fo = ~a | b;   4'd9: fo = ~(a ^ b);  4'd10: fo = b;       4'd11: fo = a & b;
      4'd12: fo = 4'hF;    4'd13: fo = a | ~b;   4'd14: fo = a | b;   default: fo = a;
    endcase
  endtask

  initial begin
    ctrl = '0;
    {ra, rb, rc, rd, rm, rs} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ctrl = ctrl_t'($urandom);
      {ctrl.a_buf_en, ctrl.b_buf_en, ctrl.c_buf_en, ctrl.mem_rd} = 4'b0001 << $urandom_range(0, 4);
      // Exercise the status register on equal operands now and then.
      if (i % 7 == 0) begin ctrl.status_ld = 1; ctrl.alu_s = 4'b0110; ctrl.alu_m = 1; end
      port_r1 = 4'($urandom);
      port_r2 = (i % 7 == 0) ? reg_a : 4'($urandom);
      // Reference: combinational bus and ALU, then the clock edge.
      bus = ({4{ctrl.a_buf_en}} & port_r1) | ({4{ctrl.b_buf_en}} & port_r2) |
            ({4{ctrl.c_buf_en}} & rc) | ({4{ctrl.mem_rd}} & rm);
      alu_ref(ra, rb, ctrl.alu_s, ctrl.alu_m, ctrl.alu_cn, f, carry);
      @(posedge clk);
      if (ctrl.clk_a) ra = ctrl.sh_a ? {ra[3], ra[3:1]} : bus;
      if (ctrl.clk_b) rb = ctrl.sh_b ? {rb[3], rb[3:1]} : bus;
      if (ctrl.clk_c) rc = f;
      if (ctrl.clk_d) rd = bus;
      if (ctrl.mem_wr) rm = bus;
      else if (ctrl.carry_wr) begin rm = {3'b000, carry}; if (carry) carry_ones++; end
      if (ctrl.status_ld) begin rs = (f == 4'b0000); if (rs) status_ones++; end
      #1;
      checks++;
      if ({reg_a, reg_b, reg_c, reg_d, mem_q, status} !== {ra, rb, rc, rd, rm, rs}) begin
        failures++;
        $display("FAIL i=%0d dut A%h B%h C%h D%h M%h S%b ref A%h B%h C%h D%h M%h S%b", i,
                 reg_a, reg_b, reg_c, reg_d, mem_q, status, ra, rb, rc, rd, rm, rs);
      end
    end
    // Both values of status and of the stored carry must have been seen.
    checks++;
    if (status_ones == 0 || carry_ones == 0) begin
      failures++;
      $display("FAIL coverage status_ones=%0d carry_ones=%0d", status_ones, carry_ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
