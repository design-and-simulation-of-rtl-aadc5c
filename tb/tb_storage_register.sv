// tb_storage_register: random bus writes and carry writes to the memory
// unit, compared with a reference word; a bus write has priority.
module tb_storage_register;
  logic       clk = 0, rst_n = 0, wr = 0, carry_wr = 0, carry = 0;
  logic [3:0] d = 0, q, ref_q;
  int checks = 0, failures = 0;

  storage_register dut (.*);

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
    #1 checks++; if (q !== 4'b0) failures++;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      wr       = 1'($urandom_range(0, 3) == 0);
      carry_wr = 1'($urandom_range(0, 2) == 0);
      carry    = 1'($urandom);
      d        = 4'($urandom);
      @(posedge clk);
      if (wr)            ref_q = d;
      else if (carry_wr) ref_q = {3'b000, carry};
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL i=%0d q=%b expected %b", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
