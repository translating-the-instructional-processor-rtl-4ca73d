// tb_stack: self-checking testbench for the subroutine stack.
// Pushes to full (and one past, checking the overflow flag), pops to empty
// (and one past, checking underflow), then random push / pop / both traffic
// against a queue model of the LIFO.
module tb_stack;
  localparam int DEPTH = 16;
  logic        clk = 1'b0, rst;
  logic        push, pop;
  logic [15:0] din, top;
  logic        empty, full, ovf, unf;
  logic [15:0] model [$];
  int checks = 0, failures = 0;

  stack #(.DATA_W(16), .DEPTH(DEPTH)) dut (.clk(clk), .rst(rst), .push(push), .pop(pop), .din(din),
    .top(top), .empty(empty), .full(full), .overflow(ovf), .underflow(unf));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (top=%h size=%0d)", what, top, model.size()); end
  endtask

  task automatic compare();
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() > 0) check(top == model[$], "top value");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0; #1;
    compare();
    check(!ovf && !unf, "flags clear after reset");
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); push = 1; din = 16'h100 + 16'(i);
      @(posedge clk); model.push_back(din); #1; compare();
    end
    @(negedge clk); push = 1; din = 16'hDEAD;
    @(posedge clk); #1; compare();
    check(ovf, "overflow on push when full");
    @(negedge clk); push = 0;
    while (model.size() > 0) begin
      @(negedge clk); pop = 1;
      @(posedge clk); void'(model.pop_back()); #1; compare();
    end
    check(!unf, "no underflow yet");
    @(negedge clk); pop = 1;
    @(posedge clk); #1; compare();
    check(unf, "underflow on pop when empty");
    @(negedge clk); pop = 0; rst = 1;
    @(posedge clk); #1;
    check(!ovf && !unf && empty, "reset clears");
    @(negedge clk); rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      push = 1'($urandom); pop = 1'($urandom); din = 16'($urandom);
      @(posedge clk);
      if (push && pop) begin
        if (model.size() == 0) model.push_back(din); else model[$] = din;
      end else if (push) begin
        if (model.size() < DEPTH) model.push_back(din);
      end else if (pop) begin
        if (model.size() > 0) void'(model.pop_back());
      end
      #1; compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
