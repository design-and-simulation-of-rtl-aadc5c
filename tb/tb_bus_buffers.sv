// tb_bus_buffers: each tri-state source alone drives the bus; with no
// source enabled the bus reads zero.
module tb_bus_buffers;
  logic       clk = 0, r1_en = 0, r2_en = 0, c_en = 0, mem_en = 0;
  logic [3:0] r1, r2, c, mem, bus, exp_bus;
  int checks = 0, failures = 0;

  bus_buffers dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      {r1, r2, c, mem} = 16'($urandom);
      {r1_en, r2_en, c_en, mem_en} = 4'b0000;
      case (i % 5)
        0: r1_en = 1;
        1: r2_en = 1;
        2: c_en = 1;
        3: mem_en = 1;
        default: ;
      endcase
      case (i % 5)
        0: exp_bus = r1;
        1: exp_bus = r2;
        2: exp_bus = c;
        3: exp_bus = mem;
        default: exp_bus = 4'b0000;
      endcase
      #1;
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        $display("FAIL i=%0d bus=%b expected %b", i, bus, exp_bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
