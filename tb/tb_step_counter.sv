// tb_step_counter: self-checking testbench for the step counter.
// Checks reset to T0, counting one step per clock, Clear at every step
// returning to T0 on the next edge, and the wrap after T7.
module tb_step_counter;
  logic       clk = 1'b0, rst, clear;
  logic [2:0] step;
  int checks = 0, failures = 0;

  step_counter #(.NSTEPS(8)) dut (.clk(clk), .rst(rst), .clear(clear), .step(step));

  always #5 clk = ~clk;

  task automatic check(input logic [2:0] exp, input string what);
    checks++;
    if (step !== exp) begin failures++; $display("FAIL %s: step=%0d expected %0d", what, step, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clear = 0;
    @(posedge clk); #1; check(0, "reset");
    @(negedge clk); rst = 0;
    for (int i = 1; i < 20; i++) begin
      @(posedge clk); #1; check(3'(i % 8), "free count");
    end
    // clear at each possible step
    for (int s = 0; s < 8; s++) begin
      @(negedge clk); clear = 1; @(posedge clk); #1; check(0, "clear");
      @(negedge clk); clear = 0;
      for (int k = 1; k <= s; k++) begin @(posedge clk); #1; check(3'(k), "recount"); end
    end
    @(negedge clk); rst = 1; @(posedge clk); #1; check(0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
