// tb_control_unit: self-checking testbench for the control signal encoder.
//
// Part 1 checks the exact control words of the fetch steps and of several
// instructions step by step (register, immediate, indirect and absolute
// operands, memory destinations, taken and untaken branch, JSR, RTS),
// written out here by hand from the instruction set definition.
// Part 2 walks every one of the 65536 instruction words (with random STATUS)
// through the steps and checks: the instruction ends (Clear) after the number
// of steps the instruction set defines, never more than eight; at most one
// source drives each bus; every data operation that writes a result also
// loads STATUS; the ALU operation of the result step equals the opcode.
module tb_control_unit;
  import ip_pkg::*;
  logic [15:0] ir;
  step_e       step;
  status_t     st;
  ctrl_t       c, e;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  control_unit dut (.step(step), .ir(ir), .status(st), .ctrl(c));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] enc(input int op, input int sreg, input int smode,
                                      input int dreg, input int dmode, input int cnd = 0);
    return {4'(op), 1'b0, 2'(sreg), 2'(smode), 2'(dreg), 2'(dmode), 3'(cnd)};
  endfunction

  task automatic expect_word(input logic [15:0] w, input step_e s, input ctrl_t exp, input string what);
    ir = w; step = s; #1;
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL %s at %s: got %b expected %b", what, s.name(), c, exp);
    end
  endtask

  // Steps an instruction takes, from the instruction set definition.
  function automatic int expected_len(input logic [15:0] w, input status_t s);
    int op, sm, dm;
    bit take;
    op = int'(w[15:12]); sm = int'(w[8:7]); dm = int'(w[4:3]);
    if (op <= 7) begin
      if (dm == 0) return (sm == 0) ? 4 : (sm == 3) ? 8 : 6;
      if (sm == 0 && dm == 1) return (op >= 4) ? 7 : 6;
      if (sm == 0 && dm == 3 && op < 4) return 8;
      return 4;
    end
    if (op == 8) begin
      case (w[2:0])
        0: take = 1;  1: take = s.z;  2: take = !s.z;  3: take = s.n;
        4: take = !s.n;  5: take = s.c;  6: take = !s.c;  default: take = s.v;
      endcase
      return take ? 6 : 4;
    end
    if (op == 9) return 6;
    return 4;
  endfunction

  initial begin
    logic [15:0] w;
    int len, nwrite;
    st = '0;

    // ---- fetch ----
    e = '0; e.pc_out_a = 1; e.load_mar = 1; e.inc_pc = 1; e.alu_op = ALU_MOVE;
    expect_word(enc(OP_ADD, 1, M0, 2, M0), T0, e, "fetch");
    e = '0; e.mem_read = 1;
    expect_word(enc(OP_ADD, 1, M0, 2, M0), T1, e, "fetch");
    e = '0; e.mdr_out_a = 1; e.load_ir = 1;
    expect_word(enc(OP_ADD, 1, M0, 2, M0), T2, e, "fetch");

    // ---- MOVE Rs,Rd at T3 (as in the original) ----
    e = '0; e.regs_read1 = 1; e.alu_op = ALU_MOVE; e.load_status = 1; e.regs_write = 1; e.clear = 1;
    expect_word(enc(OP_MOVE, 1, M0, 2, M0), T3, e, "MOVE R1,R2");
    e.alu_op = ALU_ASHR;
    expect_word(enc(OP_ASHR, 1, M0, 2, M0), T3, e, "ASHR R1,R2");
    // ---- ADD Rs,Rd reads Rd too ----
    e.alu_op = ALU_ADD; e.regs_read2 = 1;
    expect_word(enc(OP_ADD, 1, M0, 2, M0), T3, e, "ADD R1,R2");

    // ---- SUB #imm,Rd ----
    w = enc(OP_SUB, 0, M2, 3, M0);
    e = '0; e.pc_out_a = 1; e.inc_pc = 1; e.load_mar = 1;
    expect_word(w, T3, e, "SUB #,R3");
    e = '0; e.mem_read = 1;
    expect_word(w, T4, e, "SUB #,R3");
    e = '0; e.mdr_out_a = 1; e.regs_read2 = 1; e.alu_op = ALU_SUB; e.load_status = 1; e.regs_write = 1; e.clear = 1;
    expect_word(w, T5, e, "SUB #,R3");

    // ---- ADD [R2],R0 ----
    w = enc(OP_ADD, 2, M1, 0, M0);
    e = '0; e.regs_read1 = 1; e.load_mar = 1;
    expect_word(w, T3, e, "ADD [R2],R0");

    // ---- MOVE [abs],R1 ----
    w = enc(OP_MOVE, 0, M3, 1, M0);
    e = '0; e.mdr_out_a = 1; e.load_mar = 1;
    expect_word(w, T5, e, "MOVE [abs],R1");
    e = '0; e.mem_read = 1;
    expect_word(w, T6, e, "MOVE [abs],R1");
    e = '0; e.mdr_out_a = 1; e.load_status = 1; e.regs_write = 1; e.clear = 1;
    expect_word(w, T7, e, "MOVE [abs],R1");

    // ---- MOVE R0,[abs] ----
    w = enc(OP_MOVE, 0, M0, 0, M3);
    e = '0; e.regs_read1 = 1; e.load_mdr = 1; e.load_status = 1;
    expect_word(w, T6, e, "MOVE R0,[abs]");
    e = '0; e.mem_write = 1; e.clear = 1;
    expect_word(w, T7, e, "MOVE R0,[abs]");

    // ---- OR R1,[R3] ----
    w = enc(OP_OR, 1, M0, 3, M1);
    e = '0; e.regs_read2 = 1; e.alu_op = ALU_PASSB; e.load_mar = 1;
    expect_word(w, T3, e, "OR R1,[R3]");
    e = '0; e.mem_read = 1;
    expect_word(w, T4, e, "OR R1,[R3]");
    e = '0; e.regs_read1 = 1; e.mdr_out_b = 1; e.alu_op = ALU_OR; e.load_mdr = 1; e.load_status = 1;
    expect_word(w, T5, e, "OR R1,[R3]");
    e = '0; e.mem_write = 1; e.clear = 1;
    expect_word(w, T6, e, "OR R1,[R3]");

    // ---- BNZ: taken with Z=0, skipped with Z=1 ----
    w = enc(OP_BR, 0, M0, 0, M0, C_NZ);
    st = '0;
    e = '0; e.pc_out_a = 1; e.inc_pc = 1; e.load_mar = 1;
    expect_word(w, T3, e, "BNZ taken");
    e = '0; e.mdr_out_a = 1; e.load_pc = 1; e.clear = 1;
    expect_word(w, T5, e, "BNZ taken");
    st.z = 1;
    e = '0; e.inc_pc = 1; e.clear = 1;
    expect_word(w, T3, e, "BNZ not taken");
    st = '0;

    // ---- JSR / RTS ----
    w = enc(OP_JSR, 0, M0, 0, M0);
    e = '0; e.mdr_out_a = 1; e.load_pc = 1; e.push = 1; e.clear = 1;
    expect_word(w, T5, e, "JSR");
    w = enc(OP_RTS, 0, M0, 0, M0);
    e = '0; e.stack_out_a = 1; e.load_pc = 1; e.pop = 1; e.clear = 1;
    expect_word(w, T3, e, "RTS");

    // ---- every instruction word ----
    for (int i = 0; i < 65536; i++) begin
      bit ok;
      w = 16'(i);
      st = status_t'(4'($urandom));
      ir = w;
      len = 0; nwrite = 0; ok = 1;
      for (int s = 0; s < 8; s++) begin
        step = step_e'(s); #1;
        ok &= $onehot0({c.regs_read1, c.pc_out_a, c.mdr_out_a, c.stack_out_a});
        ok &= $onehot0({c.regs_read2, c.mdr_out_b});
        if (c.regs_write || (c.load_mdr && w[15] == 1'b0)) begin
          nwrite++;
          ok &= c.load_status && (c.alu_op == alu_op_e'(w[15:12]));
        end
        if (c.clear) begin len = s + 1; break; end
      end
      checks++;
      if (!ok || len != expected_len(w, st) || nwrite > 1) begin
        failures++;
        if (failures < 20) $display("FAIL ir=%h status=%b: %0d steps, expected %0d (ok=%0b)", w, st, len, expected_len(w, st), ok);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
