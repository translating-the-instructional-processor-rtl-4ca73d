// tb_alu: self-checking testbench for the ALU.
// Applies directed corner cases and random operands to every operation and
// compares the result and the {C,V,N,Z} flags with a reference computed in
// the testbench from wider integer arithmetic.
module tb_alu;
  import ip_pkg::*;
  logic [15:0] a, b, y;
  alu_op_e     op;
  status_t     flags;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  alu dut (.a(a), .b(b), .op(op), .y(y), .flags(flags));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(input alu_op_e o, input logic [15:0] ia, input logic [15:0] ib);
    int         sa, sb, sr;
    logic [15:0] ey;
    logic        ec, ev;
    sa = int'($signed(ia)); sb = int'($signed(ib));
    ec = 0; ev = 0;
    case (o)
      ALU_MOVE:  ey = ia;
      ALU_INV:   ey = 16'hFFFF ^ ia;
      ALU_SHL:   begin ey = 16'(ia * 2); ec = ia[15]; end
      ALU_ASHR:  begin ey = 16'(sa / 2 - ((sa < 0 && (sa % 2) != 0) ? 1 : 0)); ec = ia[0]; end
      ALU_ADD:   begin ey = 16'(int'(ia) + int'(ib)); ec = (int'(ia) + int'(ib)) > 65535;
                       sr = sa + sb; ev = (sr > 32767) || (sr < -32768); end
      ALU_SUB:   begin ey = 16'(int'(ib) - int'(ia)); ec = int'(ib) < int'(ia);
                       sr = sb - sa; ev = (sr > 32767) || (sr < -32768); end
      ALU_AND:   ey = ia & ib;
      ALU_OR:    ey = ia | ib;
      default:   ey = ib;   // PASSB
    endcase
    a = ia; b = ib; op = o; #1;
    checks++;
    if (y !== ey || flags.c !== ec || flags.v !== ev || flags.n !== ey[15] || flags.z !== (ey == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h: y=%h flags=%b expected y=%h c=%b v=%b", o.name(), ia, ib, y, flags, ey, ec, ev);
    end
  endtask

  initial begin
    alu_op_e ops [9] = '{ALU_MOVE, ALU_INV, ALU_SHL, ALU_ASHR, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_PASSB};
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h5555};
    foreach (ops[k])
      foreach (corner[i])
        foreach (corner[j])
          expect_op(ops[k], corner[i], corner[j]);
    for (int n = 0; n < 3000; n++)
      expect_op(ops[$urandom_range(8)], 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
