// tb_reg4: self-checking testbench for the 4 x 16 register file.
// Writes every register, then runs random read / write traffic against a
// reference array; checks that an unread port outputs zero, that reads are
// combinational (visible before the next edge) and that a write lands only on
// the next rising edge.
module tb_reg4;
  logic        clk = 1'b0;
  logic        rd1, rd2, wr;
  logic [1:0]  a1, a2;
  logic [15:0] din, dout1, dout2;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  reg4 dut (.CLK(clk), .REGS_Read1(rd1), .REGS_Read2(rd2), .REGS_Write(wr),
            .Addr1(a1), .Addr2(a2), .Data_In(din), .Data_Out1(dout1), .Data_Out2(dout2));

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd1 = 0; rd2 = 0; wr = 0; a1 = 0; a2 = 0; din = 0;
    // fill all four registers
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      wr = 1; a2 = 2'(r); din = 16'hA000 + 16'(r * 16'h111);
      model[r] = din;
    end
    @(negedge clk); wr = 0;
    // read every register on both ports
    for (int r = 0; r < 4; r++) begin
      rd1 = 1; rd2 = 1; a1 = 2'(r); a2 = 2'(3 - r); #1;
      check(dout1, model[r], "port1 read");
      check(dout2, model[3 - r], "port2 read");
    end
    // unread ports output zero
    rd1 = 0; rd2 = 0; #1;
    check(dout1, 16'h0, "port1 idle");
    check(dout2, 16'h0, "port2 idle");
    // write becomes visible only after the edge
    @(negedge clk);
    rd2 = 1; wr = 1; a2 = 2; din = 16'h1234; #1;
    check(dout2, model[2], "old value before edge");
    @(posedge clk); #1;
    model[2] = 16'h1234;
    check(dout2, 16'h1234, "new value after edge");
    // random traffic
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      rd1 = 1'($urandom); rd2 = 1'($urandom); wr = 1'($urandom);
      a1 = 2'($urandom); a2 = 2'($urandom); din = 16'($urandom);
      #1;
      check(dout1, rd1 ? model[a1] : 16'h0, "random port1");
      check(dout2, rd2 ? model[a2] : 16'h0, "random port2");
      @(posedge clk);
      if (wr) model[a2] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
