// tb_alu_74181: exhaustive check of the ALU against the published 74181
// function table (active-high data): every A, B, S, M and Cn, 8192 cases.
// Arithmetic results and the carry are computed per table entry as
// "first operand plus second operand plus carry", with "minus 1" written as
// plus 1111.
module tb_alu_74181;
  logic [3:0] a, b, s, f;
  logic       m, cn, cn4, aeqb;
  logic [3:0] exp_f;
  logic [4:0] p, q, total;
  logic       exp_carry;
  int checks = 0, failures = 0;

  alu_74181 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8192; v++) begin
      {a, b, s, m, cn} = 14'(v);
      #1;
      // Arithmetic entries of the function table.
      case (s)
        4'd0:  begin p = {1'b0, a};       q = 5'd0;           end  // A
        4'd1:  begin p = {1'b0, a | b};   q = 5'd0;           end  // A+B (or)
        4'd2:  begin p = {1'b0, a | ~b};  q = 5'd0;           end
        4'd3:  begin p = 5'd0;            q = 5'b01111;       end  // minus 1
        4'd4:  begin p = {1'b0, a};       q = {1'b0, a & ~b}; end
        4'd5:  begin p = {1'b0, a | b};   q = {1'b0, a & ~b}; end
        4'd6:  begin p = {1'b0, a};       q = {1'b0, ~b};     end  // A minus B minus 1
        4'd7:  begin p = {1'b0, a & ~b};  q = 5'b01111;       end
        4'd8:  begin p = {1'b0, a};       q = {1'b0, a & b};  end
        4'd9:  begin p = {1'b0, a};       q = {1'b0, b};      end  // A plus B
        4'd10: begin p = {1'b0, a | ~b};  q = {1'b0, a & b};  end
        4'd11: begin p = {1'b0, a & b};   q = 5'b01111;       end
        4'd12: begin p = {1'b0, a};       q = {1'b0, a};      end  // A plus A
        4'd13: begin p = {1'b0, a | b};   q = {1'b0, a};      end
        4'd14: begin p = {1'b0, a | ~b};  q = {1'b0, a};      end
        default: begin p = {1'b0, a};     q = 5'b01111;       end  // A minus 1
      endcase
      total     = p + q + (cn ? 5'd0 : 5'd1);
      exp_carry = total[4];
      if (m) begin
        case (s)
          4'd0:  exp_f = ~a;
          4'd1:  exp_f = ~(a | b);
          4'd2:  exp_f = ~a & b;
          4'd3:  exp_f = 4'b0000;
          4'd4:  exp_f = ~(a & b);
          4'd5:  exp_f = ~b;
          4'd6:  exp_f = a ^ b;
          4'd7:  exp_f = a & ~b;
          4'd8:  exp_f = ~a | b;
          4'd9:  exp_f = ~(a ^ b);
          4'd10: exp_f = b;
          4'd11: exp_f = a & b;
          4'd12: exp_f = 4'b1111;
          4'd13: exp_f = a | ~b;
          4'd14: exp_f = a | b;
          default: exp_f = a;
        endcase
      end else begin
        exp_f = total[3:0];
      end
      checks++;
      if (f !== exp_f || aeqb !== (exp_f == 4'b1111)) begin
        failures++;
        $display("FAIL a=%h b=%h s=%h m=%b cn=%b f=%h expected %h", a, b, s, m, cn, f, exp_f);
      end
      if (!m) begin
        checks++;
        if (cn4 !== ~exp_carry) begin
          failures++;
          $display("FAIL carry a=%h b=%h s=%h cn=%b cn4=%b", a, b, s, cn, cn4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
