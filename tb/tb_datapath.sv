// tb_datapath: self-checking testbench for the three-bus data path.
//
// Drives random but legal control words (at most one source per bus, at most
// one load source per register) together with random memory read data and
// keeps a register-level reference model of PC, IR, MAR, MDR, STATUS, the
// four general registers and the return-address stack. After every clock
// the visible registers are compared with the model, and the general
// registers are compared by reading them back over BUS_A into the MAR.
module tb_datapath;
  import ip_pkg::*;

  logic        clk = 1'b0, rst;
  ctrl_t       c;
  logic [15:0] rdata, ir, pc, mar, mdr;
  status_t     st;
  logic        ovf, unf;
  int checks = 0, failures = 0;

  datapath dut (.clk(clk), .rst(rst), .ctrl(c), .mem_rdata(rdata), .ir(ir), .status(st),
                .pc(pc), .mar(mar), .mdr(mdr), .stack_overflow(ovf), .stack_underflow(unf));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [15:0] m_r [4];
  logic [15:0] m_pc, m_ir, m_mar, m_mdr;
  status_t     m_st;
  logic [15:0] m_stk [$];
  bit          m_ovf, m_unf;

  function automatic void ref_alu(input alu_op_e op, input logic [15:0] a, input logic [15:0] b,
                                  output logic [15:0] y, output status_t f);
    logic [16:0] w;
    f = '0;
    case (op)
      ALU_MOVE:  y = a;
      ALU_INV:   y = ~a;
      ALU_SHL:   begin y = a << 1; f.c = a[15]; end
      ALU_ASHR:  begin y = {a[15], a[15:1]}; f.c = a[0]; end
      ALU_ADD:   begin w = 17'(a) + 17'(b); y = w[15:0]; f.c = w[16];
                       f.v = (a[15] == b[15]) && (y[15] != a[15]); end
      ALU_SUB:   begin y = b - a; f.c = (b < a);
                       f.v = (a[15] != b[15]) && (y[15] != b[15]); end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      default:   y = b;
    endcase
    f.n = y[15]; f.z = (y == 0);
  endfunction

  task automatic compare(input string what);
    checks++;
    if (pc !== m_pc || ir !== m_ir || mar !== m_mar || mdr !== m_mdr || st !== m_st ||
        ovf !== m_ovf || unf !== m_unf) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: pc %h/%h ir %h/%h mar %h/%h mdr %h/%h st %b/%b", what,
                 pc, m_pc, ir, m_ir, mar, m_mar, mdr, m_mdr, st, m_st);
    end
  endtask

  // one clock with control word c; the model follows the same word
  task automatic cycle(input string what);
    logic [15:0] a, b, y, top;
    status_t     f;
    top = (m_stk.size() > 0) ? m_stk[$] : 16'h0;
    a = (c.regs_read1 ? m_r[m_ir[10:9]] : 16'h0) | (c.pc_out_a ? m_pc : 16'h0) |
        (c.mdr_out_a ? m_mdr : 16'h0) | (c.stack_out_a ? top : 16'h0);
    b = (c.regs_read2 ? m_r[m_ir[6:5]] : 16'h0) | (c.mdr_out_b ? m_mdr : 16'h0);
    ref_alu(c.alu_op, a, b, y, f);
    @(posedge clk);
    if (c.regs_write) m_r[m_ir[6:5]] = y;
    if (c.push) begin
      if (m_stk.size() < 16) m_stk.push_back(m_pc); else m_ovf = 1;
    end
    if (c.pop) begin
      if (m_stk.size() > 0) void'(m_stk.pop_back()); else m_unf = 1;
    end
    if (c.load_pc) m_pc = y; else if (c.inc_pc) m_pc = m_pc + 1;
    if (c.load_ir) m_ir = y;
    if (c.load_mar) m_mar = y;
    if (c.mem_read) m_mdr = rdata; else if (c.load_mdr) m_mdr = y;
    if (c.load_status) m_st = f;
    #1;
    compare(what);
    @(negedge clk);
  endtask

  initial begin
    rst = 1; c = '0; rdata = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    m_pc = 0; m_ir = 0; m_mar = 0; m_mdr = 0; m_st = '0; m_ovf = 0; m_unf = 0;
    compare("reset");
    // load IR and write each general register via MDR -> BUS_A -> BUS_C
    for (int r = 0; r < 4; r++) begin
      c = '0; c.mem_read = 1; rdata = {9'h0, 2'(r), 5'h0} | {4'h0, 1'b0, 2'(3 - r), 9'h0};
      cycle("mdr <- rdata");
      c = '0; c.mdr_out_a = 1; c.load_ir = 1; cycle("ir <- mdr");
      c = '0; c.mem_read = 1; rdata = 16'hC000 + 16'(r); cycle("mdr <- value");
      c = '0; c.mdr_out_a = 1; c.regs_write = 1; cycle("reg <- mdr");
    end
    // random legal control words
    for (int i = 0; i < 5000; i++) begin
      c = '0;
      case ($urandom_range(4))
        0: c.regs_read1 = 1;  1: c.pc_out_a = 1;  2: c.mdr_out_a = 1;  3: c.stack_out_a = 1;
        default: ;
      endcase
      case ($urandom_range(2))
        0: c.regs_read2 = 1;  1: c.mdr_out_b = 1;  default: ;
      endcase
      c.alu_op      = alu_op_e'($urandom_range(8));
      c.regs_write  = ($urandom_range(3) == 0);
      c.load_pc     = ($urandom_range(5) == 0);
      c.inc_pc      = ($urandom_range(2) == 0);
      c.load_ir     = ($urandom_range(4) == 0);
      c.load_mar    = ($urandom_range(2) == 0);
      c.mem_read    = ($urandom_range(3) == 0);
      c.load_mdr    = ($urandom_range(2) == 0);
      c.load_status = ($urandom_range(1) == 0);
      c.push        = ($urandom_range(4) == 0);
      c.pop         = !c.push && ($urandom_range(5) == 0);
      rdata = 16'($urandom);
      cycle("random");
      // read every register back through BUS_A into MAR now and then
      if (i % 500 == 0)
        for (int r = 0; r < 4; r++) begin
          c = '0; c.mem_read = 1; rdata = {4'h0, 1'b0, 2'(r), 9'h0}; cycle("mdr <- rdata");
          c = '0; c.mdr_out_a = 1; c.load_ir = 1; cycle("ir <- mdr");
          c = '0; c.regs_read1 = 1; c.load_mar = 1; cycle("mar <- reg");
          checks++;
          if (mar !== m_r[r]) begin failures++; $display("FAIL R%0d = %h expected %h", r, mar, m_r[r]); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
