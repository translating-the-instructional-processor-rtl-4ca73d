// tb_ip_mcu: end-to-end testbench of the Instructional Processor microcontroller.
//
// The microcontroller runs at its default sizes (4K x 16 memory, 16-entry
// stack). Programs are written into memory through the load port while reset
// is held. Three phases:
//  1. The array-sum example program (counter + pointer loop over three
//     elements). Checks the stored sum (9) and the clock cycle at which it is
//     written (98 cycles after reset, from the per-instruction step counts).
//  2. A directed program touching every addressing mode, ALU operation,
//     branch condition (taken and not taken), nested JSR / RTS, I/O reads and
//     writes and the no-operation combinations.
//  3. Random programs (every memory word random, so code, data and jumps are
//     all random).
// Phases 2 and 3 run in lockstep with an instruction-level reference model
// written here from the instruction set definition: after every instruction
// the PC, registers, STATUS, output ports and the instruction's cycle count
// are compared, and the whole memory at the end of each program. Each
// mechanism of the design is counted and must occur at least once.
module tb_ip_mcu;
  import ip_pkg::*;

  localparam int WORDS = 4096;

  logic        clk = 1'b0, rst;
  logic        ld_we;
  logic [11:0] ld_addr;
  logic [15:0] ld_data, in0, in1, out0, out1, pc;
  logic [2:0]  step;
  logic        s_ovf, s_unf;

  ip_mcu dut (.clk(clk), .rst(rst), .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
              .in_port0(in0), .in_port1(in1), .out_port0(out0), .out_port1(out1),
              .pc(pc), .step(step), .stack_overflow(s_ovf), .stack_underflow(s_unf));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- assembler helpers ----------------
  function automatic logic [15:0] enc(input int op, input int sreg, input int smode,
                                      input int dreg, input int dmode, input int cnd = 0);
    return {4'(op), 1'b0, 2'(sreg), 2'(smode), 2'(dreg), 2'(dmode), 3'(cnd)};
  endfunction

  // ---------------- reference model ----------------
  logic [15:0] img [WORDS];         // program image
  int          pa;                  // assembly location counter

  function automatic void emit(input logic [15:0] w);
    img[pa] = w;
    pa++;
  endfunction
  logic [15:0] rm_mem [WORDS];
  logic [15:0] rm_r [4];
  logic [15:0] rm_pc, rm_out0, rm_out1;
  status_t     rm_st;
  logic [15:0] rm_stack [$];
  bit          rm_ovf, rm_unf;

  // mechanism counters
  int n_src[4], n_dst_ind1, n_dst_ind2, n_dst_abs, n_br_taken, n_br_not, n_jsr, n_rts,
      n_io_rd, n_io_wr, n_mem_wr, n_nop, n_alu[9], n_ovf, n_unf;

  function automatic logic [15:0] rm_rd(input logic [15:0] a);
    if (a < 16'(WORDS)) return rm_mem[a[11:0]];
    if (a == 16'hFFF0) begin n_io_rd++; return in0; end
    if (a == 16'hFFF1) begin n_io_rd++; return in1; end
    if (a == 16'hFFF8) return rm_out0;
    if (a == 16'hFFF9) return rm_out1;
    return 16'h0;
  endfunction

  function automatic void rm_wr(input logic [15:0] a, input logic [15:0] v);
    if (a < 16'(WORDS)) begin rm_mem[a[11:0]] = v; n_mem_wr++; end
    else if (a == 16'hFFF8) begin rm_out0 = v; n_io_wr++; end
    else if (a == 16'hFFF9) begin rm_out1 = v; n_io_wr++; end
  endfunction

  function automatic void rm_alu(input int op, input logic [15:0] a, input logic [15:0] b,
                                 output logic [15:0] y, output status_t f);
    logic [16:0] w;
    f = '0;
    case (op)
      0: y = a;
      1: y = ~a;
      2: begin y = a << 1; f.c = a[15]; end
      3: begin y = {a[15], a[15:1]}; f.c = a[0]; end
      4: begin w = 17'(b) + 17'(a); y = w[15:0]; f.c = w[16];
               f.v = (a[15] == b[15]) && (y[15] != b[15]); end
      5: begin w = 17'(b) - 17'(a); y = w[15:0]; f.c = (b < a);
               f.v = (a[15] != b[15]) && (y[15] != b[15]); end
      6: y = a & b;
      default: y = a | b;
    endcase
    f.n = y[15];
    f.z = (y == 16'h0);
    n_alu[op]++;
  endfunction

  // Executes one instruction; returns its clock cycles.
  function automatic int rm_step();
    logic [15:0] w, v, y, t, ad;
    int op, s, sm, d, dm, cnd;
    bit take;
    status_t f;
    w = rm_rd(rm_pc); rm_pc++;
    op = int'(w[15:12]); s = int'(w[10:9]); sm = int'(w[8:7]);
    d = int'(w[6:5]); dm = int'(w[4:3]); cnd = int'(w[2:0]);
    if (op <= 7) begin
      if (dm == 0) begin
        n_src[sm]++;
        case (sm)
          0: v = rm_r[s];
          1: v = rm_rd(rm_r[s]);
          2: begin v = rm_rd(rm_pc); rm_pc++; end
          default: begin t = rm_rd(rm_pc); rm_pc++; v = rm_rd(t); end
        endcase
        rm_alu(op, v, (op >= 4) ? rm_r[d] : 16'h0, y, f);
        rm_r[d] = y; rm_st = f;
        return (sm == 0) ? 4 : (sm == 3) ? 8 : 6;
      end else if (sm == 0 && dm == 1) begin
        ad = rm_r[d];
        if (op >= 4) begin
          n_dst_ind2++;
          rm_alu(op, rm_r[s], rm_rd(ad), y, f);
          rm_st = f; rm_wr(ad, y);
          return 7;
        end
        n_dst_ind1++;
        rm_alu(op, rm_r[s], 16'h0, y, f);
        rm_st = f; rm_wr(ad, y);
        return 6;
      end else if (sm == 0 && dm == 3 && op < 4) begin
        n_dst_abs++;
        ad = rm_rd(rm_pc); rm_pc++;
        rm_alu(op, rm_r[s], 16'h0, y, f);
        rm_st = f; rm_wr(ad, y);
        return 8;
      end
      n_nop++;
      return 4;
    end
    if (op == 8 || op == 9) begin
      case (cnd)
        0: take = 1;
        1: take = rm_st.z;
        2: take = !rm_st.z;
        3: take = rm_st.n;
        4: take = !rm_st.n;
        5: take = rm_st.c;
        6: take = !rm_st.c;
        default: take = rm_st.v;
      endcase
      if (op == 9) take = 1;
      if (!take) begin n_br_not++; rm_pc++; return 4; end
      t = rm_rd(rm_pc); rm_pc++;
      if (op == 9) begin
        n_jsr++;
        if (rm_stack.size() < 16) rm_stack.push_back(rm_pc);
        else begin rm_ovf = 1; n_ovf++; end
      end else n_br_taken++;
      rm_pc = t;
      return 6;
    end
    if (op == 10) begin
      n_rts++;
      if (rm_stack.size() > 0) rm_pc = rm_stack.pop_back();
      else begin rm_pc = 16'h0; rm_unf = 1; n_unf++; end
      return 4;
    end
    n_nop++;
    return 4;
  endfunction

  // ---------------- DUT control ----------------
  task automatic load_and_reset();
    rst = 1; ld_we = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      ld_we = 1; ld_addr = 12'(i); ld_data = img[i];
      @(negedge clk);
    end
    ld_we = 0;
    @(negedge clk);
    rst = 0;
  endtask

  task automatic rm_reset();
    foreach (rm_mem[i]) rm_mem[i] = img[i];
    foreach (rm_r[i]) rm_r[i] = dut.u_dp.u_regs.regs[i];   // registers have no reset
    rm_pc = 0; rm_st = '0; rm_out0 = 0; rm_out1 = 0;
    rm_stack.delete(); rm_ovf = 0; rm_unf = 0;
  endtask

  // Run n instructions in lockstep (DUT released from reset at a negedge).
  task automatic run_lockstep(input int n, input string tag);
    int exp_cyc, cyc;
    bit ok;
    rm_reset();
    for (int k = 0; k < n; k++) begin
      exp_cyc = rm_step();
      cyc = 0;
      do begin
        @(posedge clk); cyc++;
      end while (!dut.ctrl.clear && cyc < 20);
      #1;
      ok = (cyc == exp_cyc) && (pc == rm_pc) && (dut.u_dp.status == rm_st) &&
           (out0 == rm_out0) && (out1 == rm_out1) && (s_ovf == rm_ovf) && (s_unf == rm_unf);
      for (int r = 0; r < 4; r++) ok &= (dut.u_dp.u_regs.regs[r] == rm_r[r]);
      check(ok, $sformatf("%s instr %0d: cycles %0d/%0d pc %h/%h st %b/%b r0 %h/%h r1 %h/%h r2 %h/%h r3 %h/%h",
            tag, k, cyc, exp_cyc, pc, rm_pc, dut.u_dp.status, rm_st,
            dut.u_dp.u_regs.regs[0], rm_r[0], dut.u_dp.u_regs.regs[1], rm_r[1],
            dut.u_dp.u_regs.regs[2], rm_r[2], dut.u_dp.u_regs.regs[3], rm_r[3]));
      if (!ok) break;
    end
    ok = 1;
    for (int i = 0; i < WORDS; i++) ok &= (dut.u_mem.mem[i] == rm_mem[i]);
    check(ok, {tag, ": memory contents at end"});
  endtask

  // DUT-side mechanism counters
  int d_push, d_pop, d_io_rd, d_io_wr, d_stall_steps;
  always @(posedge clk) if (!rst) begin
    if (dut.ctrl.push) d_push++;
    if (dut.ctrl.pop)  d_pop++;
    if (dut.ctrl.mem_read  && dut.io_sel) d_io_rd++;
    if (dut.ctrl.mem_write && dut.io_sel) d_io_wr++;
  end

  // ---------------- test sequence ----------------
  initial begin
    automatic longint t_start, t_write;
    automatic int a;
    rst = 1; ld_we = 0; ld_addr = 0; ld_data = 0; in0 = 16'h00C3; in1 = 16'h8001;

    // ===== phase 1: array sum =====
    foreach (img[i]) img[i] = 16'h0;
    pa = 0;
    emit(enc(OP_MOVE, 0, M3, 1, M0)); emit(16'h0101);   // START: MOVE [N],R1
    emit(enc(OP_MOVE, 0, M2, 2, M0)); emit(16'h0102);   //        MOVE X,R2
    emit(enc(OP_MOVE, 0, M2, 0, M0)); emit(16'h0000);   //        MOVE 0,R0
    emit(enc(OP_ADD,  2, M1, 0, M0));                        // LOOP:  ADD [R2],R0
    emit(enc(OP_ADD,  0, M2, 2, M0)); emit(16'h0001);   //        ADD 1,R2
    emit(enc(OP_ADD,  0, M2, 1, M0)); emit(16'hFFFF);   //        ADD -1,R1
    emit(enc(OP_BR,   0, M0, 0, M0, C_NZ)); emit(16'd6); //       BNZ LOOP
    emit(enc(OP_MOVE, 0, M0, 0, M3)); emit(16'h0100);   //        MOVE R0,[SUM]
    emit(enc(OP_BR,   0, M0, 0, M0, C_ALWAYS)); emit(16'd15); // STOP: BRA STOP
    img[16'h100] = 16'h0;         // SUM
    img[16'h101] = 16'd3;         // N
    img[16'h102] = 16'd7;         // X
    img[16'h103] = 16'hFFF8;      // -8
    img[16'h104] = 16'd10;
    load_and_reset();
    t_start = cycle;
    t_write = 0;
    while (cycle - t_start < 400) begin
      @(posedge clk);
      if (t_write == 0 && dut.u_mem.mem[12'h100] != 16'h0) t_write = cycle - t_start;
    end
    check(dut.u_mem.mem[12'h100] == 16'd9, $sformatf("array sum = %0d, expected 9", dut.u_mem.mem[12'h100]));
    // 8 + 6 + 6 + 3*(6+6+6) + 2*6 + 4 + 8 = 98 cycles
    check(t_write == 98, $sformatf("sum written after %0d cycles, expected 98", t_write));
    check(pc == 16'd15 || pc == 16'd16 || pc == 16'd17, "processor parked in STOP loop");
    $display("phase 1: sum=%0d written at cycle %0d", dut.u_mem.mem[12'h100], t_write);

    // ===== phase 2: directed coverage program =====
    foreach (img[i]) img[i] = 16'h0;
    pa = 0;
    emit(enc(OP_MOVE, 0, M3, 0, M0)); emit(16'hFFF0);   // MOVE [IN0],R0
    emit(enc(OP_MOVE, 0, M2, 3, M0)); emit(16'hFFF8);   // MOVE #OUT0,R3
    emit(enc(OP_MOVE, 0, M0, 3, M1));                        // MOVE R0,[R3]
    emit(enc(OP_INV,  0, M0, 1, M0));                        // INV R0,R1
    emit(enc(OP_SHL,  1, M0, 1, M0));                        // SHL R1,R1 (C=1)
    emit(enc(OP_BR,   0, M0, 0, M0, C_C));  emit(16'(pa + 2));  // BC +  (taken)
    emit(enc(15, 0, M0, 0, M0));                             // skipped
    emit(enc(OP_ASHR, 1, M0, 2, M0));                        // ASHR R1,R2
    emit(enc(OP_SUB,  2, M0, 1, M0));                        // SUB R2,R1
    emit(enc(OP_AND,  0, M0, 1, M0));                        // AND R0,R1
    emit(enc(OP_OR,   2, M0, 1, M0));                        // OR R2,R1
    emit(enc(OP_MOVE, 0, M2, 2, M0)); emit(16'h0200);   // MOVE #0x200,R2
    emit(enc(OP_ADD,  1, M0, 2, M1));                        // ADD R1,[R2]
    emit(enc(OP_SHL,  1, M0, 0, M3)); emit(16'h0201);   // SHL R1,[0x201]
    emit(enc(OP_SUB,  3, M0, 2, M0));                        // SUB R3,R2
    emit(enc(OP_BR,   0, M0, 0, M0, C_V));  emit(16'h0);  // BV
    emit(enc(OP_BR,   0, M0, 0, M0, C_Z));  emit(16'h0);  // BZ (not taken)
    emit(enc(OP_BR,   0, M0, 0, M0, C_N));  emit(16'h0);  // BN
    emit(enc(OP_BR,   0, M0, 0, M0, C_NN)); emit(16'(pa + 1));
    emit(enc(OP_BR,   0, M0, 0, M0, C_NC)); emit(16'(pa + 1));
    emit(enc(OP_JSR,  0, M0, 0, M0));       emit(16'h0300);   // JSR SUB1
    emit(enc(OP_MOVE, 0, M2, 2, M1));       emit(16'h0005);   // unsupported: no-op
    emit(enc(OP_ADD,  0, M0, 0, M3));       emit(16'h0202);   // unsupported: no-op
    emit(enc(OP_MOVE, 0, M0, 0, M2));                              // dst M2: no-op
    emit(enc(12,      0, M0, 0, M0));                              // undefined opcode
    emit(enc(OP_MOVE, 0, M3, 1, M0));       emit(16'hFFF1);   // MOVE [IN1],R1
    emit(enc(OP_ADD,  1, M0, 1, M0));                              // ADD R1,R1 (C,V)
    emit(enc(OP_MOVE, 1, M0, 0, M3));       emit(16'hFFF9);   // MOVE R1,[OUT1]
    emit(enc(OP_MOVE, 0, M3, 2, M0));       emit(16'hFFF8);   // MOVE [OUT0],R2
    emit(enc(OP_MOVE, 0, M0, 0, M0));                              // MOVE R0,R0
    emit(enc(OP_BR,   0, M0, 0, M0, C_NZ)); emit(16'(pa + 1));
    for (int k = 0; k < 17; k++) begin                                  // 17 nested calls:
      emit(enc(OP_JSR, 0, M0, 0, M0)); emit(16'(pa + 1));                // the last overflows
    end
    a = pa; emit(enc(OP_BR, 0, M0, 0, M0, C_ALWAYS)); emit(16'(a));         // BRA self
    // SUB1: JSR SUB2; ADD #1,R0; RTS     SUB2: ADD #2,R0; RTS
    img[16'h300] = enc(OP_JSR, 0, M0, 0, M0); img[16'h301] = 16'h0310;
    img[16'h302] = enc(OP_ADD, 0, M2, 0, M0); img[16'h303] = 16'h0001;
    img[16'h304] = enc(OP_RTS, 0, M0, 0, M0);
    img[16'h310] = enc(OP_ADD, 0, M2, 0, M0); img[16'h311] = 16'h0002;
    img[16'h312] = enc(OP_RTS, 0, M0, 0, M0);
    img[16'h200] = 16'h1111;
    load_and_reset();
    run_lockstep(80, "directed");
    check(out0 == 16'h00C3, "out0 = in0 copied through I/O");

    // ===== phase 3: random programs =====
    for (int seed = 0; seed < 3; seed++) begin
      in0 = 16'($urandom); in1 = 16'($urandom);
      // data region 0x800..0xFFF: random words; code region 0x000..0x7FF:
      // random instructions whose extension words point into memory or I/O
      foreach (img[i]) img[i] = 16'($urandom);
      pa = 0;
      while (pa < 16'h7F0) begin
        automatic logic [15:0] w = 16'($urandom);
        automatic int op;
        if (w[15:12] == 4'(OP_RTS) && $urandom_range(3) != 0) w[15] = 1'b0;   // fewer returns
        op = int'(w[15:12]);
        emit(w);
        if (op == 8 || op == 9)
          emit(16'($urandom_range(16'h7EF)));
        else if (op <= 7 && ((w[4:3] == 2'(M0) && w[8] == 1'b1) ||
                             (w[8:7] == 2'(M0) && w[4:3] == 2'(M3) && op < 4)))
          case ($urandom_range(3))
            0: emit(16'hFFF0 | 16'($urandom_range(15)));
            1: emit(16'($urandom));
            default: emit(16'($urandom_range(WORDS - 1)));
          endcase
      end
      for (int i = 16'h7F0; i < 16'h800; i += 2) begin   // jump back to the start
        img[i] = enc(OP_BR, 0, M0, 0, M0, C_ALWAYS); img[i + 1] = 16'h0;
      end
      load_and_reset();
      run_lockstep(3000, $sformatf("random %0d", seed));
    end

    // ===== mechanism coverage =====
    begin
      automatic string names [] = '{"src register", "src indirect", "src immediate", "src absolute",
        "dst indirect (1-op)", "dst indirect (2-op)", "dst absolute", "branch taken",
        "branch not taken", "JSR", "RTS", "I/O read", "I/O write", "memory write",
        "no-operation", "stack overflow", "stack underflow", "DUT push", "DUT pop",
        "DUT I/O read", "DUT I/O write"};
      automatic int counts [] = '{n_src[0], n_src[1], n_src[2], n_src[3], n_dst_ind1, n_dst_ind2,
        n_dst_abs, n_br_taken, n_br_not, n_jsr, n_rts, n_io_rd, n_io_wr, n_mem_wr, n_nop,
        n_ovf, n_unf, d_push, d_pop, d_io_rd, d_io_wr};
      foreach (names[i]) begin
        $display("mechanism %-22s %0d", names[i], counts[i]);
        check(counts[i] > 0, {"mechanism never happened: ", names[i]});
      end
      foreach (n_alu[i]) if (i < 8) check(n_alu[i] > 0, $sformatf("ALU op %0d never used", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
