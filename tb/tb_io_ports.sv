// tb_io_ports: self-checking testbench for the memory-mapped I/O ports.
// Checks address decoding (sel over 0xFFF0..0xFFFF only), input port reads,
// output port writes and read-back, that writes to other addresses leave the
// outputs alone, and reset.
module tb_io_ports;
  logic        clk = 1'b0, rst, we, sel;
  logic [15:0] addr, wdata, rdata, in0, in1, out0, out1;
  logic [15:0] m0, m1;
  int checks = 0, failures = 0;

  io_ports dut (.clk(clk), .rst(rst), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata), .sel(sel),
                .in_port0(in0), .in_port1(in1), .out_port0(out0), .out_port1(out1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h rdata=%h out0=%h out1=%h", what, addr, rdata, out0, out1); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; addr = 0; wdata = 0; in0 = 16'h1357; in1 = 16'h2468;
    @(posedge clk); #1;
    check(out0 == 0 && out1 == 0, "reset clears outputs");
    m0 = 0; m1 = 0;
    @(negedge clk); rst = 0;
    addr = 16'hFFF0; #1; check(sel && rdata == 16'h1357, "read in0");
    addr = 16'hFFF1; #1; check(sel && rdata == 16'h2468, "read in1");
    addr = 16'h0FFF; #1; check(!sel, "memory address not selected");
    addr = 16'hFFEF; #1; check(!sel, "below I/O page not selected");
    addr = 16'hFFF5; #1; check(sel && rdata == 0, "unused I/O address reads 0");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in0 = 16'($urandom); in1 = 16'($urandom);
      case ($urandom_range(3))
        0: addr = 16'hFFF8;
        1: addr = 16'hFFF9;
        2: addr = 16'hFFF0 | 16'($urandom_range(15));
        default: addr = 16'($urandom);
      endcase
      we = 1'($urandom); wdata = 16'($urandom);
      #1;
      check(sel == (addr[15:4] == 12'hFFF), "sel decode");
      if (addr == 16'hFFF0) check(rdata == in0, "in0 read");
      if (addr == 16'hFFF1) check(rdata == in1, "in1 read");
      if (addr == 16'hFFF8) check(rdata == m0, "out0 readback");
      if (addr == 16'hFFF9) check(rdata == m1, "out1 readback");
      @(posedge clk);
      if (we && addr == 16'hFFF8) m0 = wdata;
      if (we && addr == 16'hFFF9) m1 = wdata;
      #1; check(out0 == m0 && out1 == m1, "output ports");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
