// tb_decoder_4to16: exhaustive check of the 4-to-16 opcode decoder: every
// opcode with every enable combination; exactly one low output when enabled.
module tb_decoder_4to16;
  logic        g1_n, g2_n;
  logic [3:0]  code;
  logic [15:0] m_n, exp_m;
  int checks = 0, failures = 0;

  decoder_4to16 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {g1_n, g2_n, code} = 6'(v);
      #1;
      exp_m = 16'hFFFF;
      if (!g1_n && !g2_n) begin
        for (int i = 0; i < 16; i++) if (i == int'(code)) exp_m[i] = 1'b0;
      end
      checks++;
      if (m_n !== exp_m) begin
        failures++;
        $display("FAIL g=%b%b code=%b m_n=%b expected %b", g1_n, g2_n, code, m_n, exp_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
