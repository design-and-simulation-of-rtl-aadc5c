// tb_decoder_3to8: exhaustive check of the 3-to-8 decoder against its truth
// table: all 64 combinations of the three enables and the three selects.
module tb_decoder_3to8;
  logic       g1, g2a_n, g2b_n, c, b, a;
  logic [7:0] y_n, exp_y;
  int checks = 0, failures = 0;

  decoder_3to8 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {g1, g2a_n, g2b_n, c, b, a} = 6'(v);
      #1;
      exp_y = 8'hFF;
      if (g1 == 1'b1 && g2a_n == 1'b0 && g2b_n == 1'b0)
        exp_y = ~(8'h01 << (4 * int'(c) + 2 * int'(b) + int'(a)));
      checks++;
      if (y_n !== exp_y) begin
        failures++;
        $display("FAIL v=%0d y_n=%b expected %b", v, y_n, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
