// tb_sequence_counter: checks that the sequence register produces
// G1, G2, G3, G1, ... (one state per clock, period of three cycles) while
// enabled, no timing state while disabled, and restarts at G1 after a pause.
module tb_sequence_counter;
  logic       clk = 0, rst_n = 0, enable = 0;
  logic [2:0] g;
  logic       last;
  int checks = 0, failures = 0;
  int k;

  sequence_counter dut (.clk, .rst_n, .enable, .g, .last);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2:0] exp_g);
    checks++;
    if (g !== exp_g || last !== exp_g[2]) begin
      failures++;
      $display("FAIL t=%0t g=%b last=%b expected g=%b", $time, g, last, exp_g);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(3'b000);
    @(negedge clk);
    // Run several instructions; the timing state advances every cycle.
    for (int run = 0; run < 3; run++) begin
      enable = 1;
      k = 0;
      repeat (3 * (run + 2)) begin
        #1 check(3'b001 << (k % 3));
        k++;
        @(negedge clk);
      end
      // Pause: no timing state.
      enable = 0;
      repeat (2) begin #1 check(3'b000); @(negedge clk); end
    end
    // Disable in the middle of an instruction; restart must begin at G1.
    enable = 1; #1 check(3'b001);
    @(negedge clk); #1 check(3'b010);
    @(negedge clk); enable = 0; #1 check(3'b000);
    @(negedge clk); enable = 1; #1 check(3'b001);
    @(negedge clk); #1 check(3'b010);
    @(negedge clk); #1 check(3'b100);
    @(negedge clk); #1 check(3'b001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
