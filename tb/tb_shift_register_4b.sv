// tb_shift_register_4b: random load / shift / hold operations on the
// register, compared every cycle with a reference value; includes the
// asynchronous clear.
module tb_shift_register_4b;
  logic       clk = 0, rst_n = 0, clk_en = 0, sh_ld_n = 0;
  logic [3:0] d = 0, q, ref_q;
  int checks = 0, failures = 0, loads = 0, shifts = 0;

  shift_register_4b dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 4'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      clk_en  = 1'($urandom_range(0, 2) != 0);
      sh_ld_n = 1'($urandom);
      d       = 4'($urandom);
      @(posedge clk);
      if (clk_en) begin
        if (sh_ld_n) begin ref_q = {ref_q[3], ref_q[3:1]}; shifts++; end
        else         begin ref_q = d; loads++; end
      end
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL i=%0d q=%b expected %b", i, q, ref_q);
      end
    end
    // Directed: 1000 shifts right arithmetically to 1100, 1110, 1111.
    @(negedge clk); clk_en = 1; sh_ld_n = 0; d = 4'b1000;
    @(negedge clk); sh_ld_n = 1;
    @(negedge clk); checks++; if (q !== 4'b1100) failures++;
    @(negedge clk); checks++; if (q !== 4'b1110) failures++;
    // Asynchronous clear.
    #2 rst_n = 0; #1;
    checks++; if (q !== 4'b0000) failures++;
    if (loads == 0 || shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
