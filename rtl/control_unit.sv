// control_unit: control signal encoder of the Instructional Processor.
//
// Purely combinational. Four decoders look at fields of the instruction
// register: the opcode (OP), the source and destination addressing modes
// (SRC_MODE, DST_MODE) and the branch condition (COND). Together with the
// current time step of the step counter and the STATUS flags they select the
// control word for this clock: which registers drive BUS_A / BUS_B, the ALU
// operation, which registers load BUS_C, memory read / write, stack push /
// pop, and Clear, which ends the instruction (the next step is T0).
//
// Fetch, common to all instructions:
//   T0  MAR <- PC, PC <- PC + 1      T1  MDR <- MEM[MAR]      T2  IR <- MDR
// Execute (cycles per instruction in brackets):
//   OP Rs,Rd            T3 Rd <- Rd op Rs, STATUS, Clear                 [4]
//   OP #imm / [Rs], Rd  T3 MAR <- PC,PC+1 (imm) or MAR <- Rs ([Rs])
//                       T4 MDR <- MEM   T5 Rd <- Rd op MDR, Clear        [6]
//   OP [abs],Rd         T3 MAR <- PC,PC+1  T4 MDR <- MEM  T5 MAR <- MDR
//                       T6 MDR <- MEM   T7 Rd <- Rd op MDR, Clear        [8]
//   OP1 Rs,[Rd]         T3 MAR <- Rd  T4 MDR <- op Rs  T5 MEM <- MDR     [6]
//   OP2 Rs,[Rd]         T3 MAR <- Rd  T4 MDR <- MEM
//                       T5 MDR <- MDR op Rs  T6 MEM <- MDR               [7]
//   OP1 Rs,[abs]        T3 MAR <- PC,PC+1  T4 MDR <- MEM  T5 MAR <- MDR
//                       T6 MDR <- op Rs  T7 MEM <- MDR                   [8]
//   BR cc,target        taken:  T3 MAR <- PC,PC+1  T4 MDR <- MEM
//                               T5 PC <- MDR, Clear                      [6]
//                       not taken: T3 PC <- PC+1 (skip target), Clear    [4]
//   JSR target          as a taken branch, and push PC at T5             [6]
//   RTS                 T3 PC <- stack top, pop, Clear                   [4]
// OP1 = MOVE/INV/SHL/ASHR (one operand), OP2 = ADD/SUB/AND/OR (two).
// Every data operation loads STATUS, MOVE included. Combinations that do not
// fit the eight time steps with the MDR as the only memory buffer (a memory
// destination with a non-register source, OP2 with an absolute destination,
// destination mode M2) and undefined opcodes do nothing and end at T3.
//
// The step counter, the T3 execution of "OP Rs,Rd" with its signal set, and
// ALU_OP = OP follow the original design; the instruction encoding, the
// addressing-mode sequences and branch/subroutine sequences are this
// implementation's own.
module control_unit
  import ip_pkg::*;
(
  input  step_e         step,
  input  logic [15:0]   ir,
  input  status_t       status,
  output ctrl_t         ctrl
);

  // --- the four instruction decoders ---
  opcode_e op;
  mode_e   src_mode, dst_mode;
  cond_e   cond;
  assign op       = opcode_e'(ir[15:12]);
  assign src_mode = mode_e'(ir[8:7]);
  assign dst_mode = mode_e'(ir[4:3]);
  assign cond     = cond_e'(ir[2:0]);

  logic is_data, is_two, cond_true;
  assign is_data = (ir[15] == 1'b0);          // MOVE..OR
  assign is_two  = is_data && ir[14];         // ADD, SUB, AND, OR

  always_comb begin
    unique case (cond)
      C_ALWAYS: cond_true = 1'b1;
      C_Z:      cond_true = status.z;
      C_NZ:     cond_true = !status.z;
      C_N:      cond_true = status.n;
      C_NN:     cond_true = !status.n;
      C_C:      cond_true = status.c;
      C_NC:     cond_true = !status.c;
      C_V:      cond_true = status.v;
      default:  cond_true = 1'b0;
    endcase
  end

  always_comb begin
    ctrl = CTRL_IDLE;
    ctrl.alu_op = ALU_MOVE;

    unique case (step)
      // ---------------- fetch ----------------
      T0: begin
        ctrl.pc_out_a = 1'b1;  ctrl.load_mar = 1'b1;  ctrl.inc_pc = 1'b1;
      end
      T1: ctrl.mem_read = 1'b1;
      T2: begin
        ctrl.mdr_out_a = 1'b1; ctrl.load_ir = 1'b1;
      end
      // ---------------- execute ----------------
      default: begin
        if (is_data) begin
          if (dst_mode == M0) begin
            // operand fetch, then Rd <- Rd op src
            case (src_mode)
              M0: begin
                if (step == T3) begin
                  ctrl.regs_read1 = 1'b1;  ctrl.regs_read2 = is_two;
                  ctrl.alu_op = alu_op_e'(op); ctrl.load_status = 1'b1;
                  ctrl.regs_write = 1'b1;  ctrl.clear = 1'b1;
                end
              end
              M1, M2: begin
                case (step)
                  T3: begin
                    if (src_mode == M1) ctrl.regs_read1 = 1'b1;
                    else begin ctrl.pc_out_a = 1'b1; ctrl.inc_pc = 1'b1; end
                    ctrl.load_mar = 1'b1;
                  end
                  T4: ctrl.mem_read = 1'b1;
                  T5: begin
                    ctrl.mdr_out_a = 1'b1;  ctrl.regs_read2 = is_two;
                    ctrl.alu_op = alu_op_e'(op); ctrl.load_status = 1'b1;
                    ctrl.regs_write = 1'b1; ctrl.clear = 1'b1;
                  end
                  default: ctrl.clear = 1'b1;
                endcase
              end
              M3: begin
                case (step)
                  T3: begin
                    ctrl.pc_out_a = 1'b1; ctrl.inc_pc = 1'b1; ctrl.load_mar = 1'b1;
                  end
                  T4: ctrl.mem_read = 1'b1;
                  T5: begin ctrl.mdr_out_a = 1'b1; ctrl.load_mar = 1'b1; end
                  T6: ctrl.mem_read = 1'b1;
                  T7: begin
                    ctrl.mdr_out_a = 1'b1;  ctrl.regs_read2 = is_two;
                    ctrl.alu_op = alu_op_e'(op); ctrl.load_status = 1'b1;
                    ctrl.regs_write = 1'b1; ctrl.clear = 1'b1;
                  end
                  default: ctrl.clear = 1'b1;
                endcase
              end
              default: ctrl.clear = 1'b1;
            endcase
          end else if (src_mode == M0 && dst_mode == M1) begin
            // Rs op [Rd]
            case (step)
              T3: begin
                ctrl.regs_read2 = 1'b1; ctrl.alu_op = ALU_PASSB; ctrl.load_mar = 1'b1;
              end
              T4: begin
                if (is_two) ctrl.mem_read = 1'b1;
                else begin
                  ctrl.regs_read1 = 1'b1; ctrl.alu_op = alu_op_e'(op);
                  ctrl.load_mdr = 1'b1;   ctrl.load_status = 1'b1;
                end
              end
              T5: begin
                if (is_two) begin
                  ctrl.regs_read1 = 1'b1; ctrl.mdr_out_b = 1'b1;
                  ctrl.alu_op = alu_op_e'(op);
                  ctrl.load_mdr = 1'b1;   ctrl.load_status = 1'b1;
                end else begin
                  ctrl.mem_write = 1'b1;  ctrl.clear = 1'b1;
                end
              end
              T6: begin ctrl.mem_write = 1'b1; ctrl.clear = 1'b1; end
              default: ctrl.clear = 1'b1;
            endcase
          end else if (src_mode == M0 && dst_mode == M3 && !is_two) begin
            // OP1 Rs,[abs]
            case (step)
              T3: begin
                ctrl.pc_out_a = 1'b1; ctrl.inc_pc = 1'b1; ctrl.load_mar = 1'b1;
              end
              T4: ctrl.mem_read = 1'b1;
              T5: begin ctrl.mdr_out_a = 1'b1; ctrl.load_mar = 1'b1; end
              T6: begin
                ctrl.regs_read1 = 1'b1; ctrl.alu_op = alu_op_e'(op);
                ctrl.load_mdr = 1'b1;   ctrl.load_status = 1'b1;
              end
              T7: begin ctrl.mem_write = 1'b1; ctrl.clear = 1'b1; end
              default: ctrl.clear = 1'b1;
            endcase
          end else begin
            ctrl.clear = 1'b1;                 // unsupported combination
          end
        end else if (op == OP_BR || op == OP_JSR) begin
          case (step)
            T3: begin
              if (op == OP_JSR || cond_true) begin
                ctrl.pc_out_a = 1'b1; ctrl.inc_pc = 1'b1; ctrl.load_mar = 1'b1;
              end else begin
                ctrl.inc_pc = 1'b1;  ctrl.clear = 1'b1;   // skip the target word
              end
            end
            T4: ctrl.mem_read = 1'b1;
            T5: begin
              ctrl.mdr_out_a = 1'b1; ctrl.load_pc = 1'b1;
              ctrl.push = (op == OP_JSR);
              ctrl.clear = 1'b1;
            end
            default: ctrl.clear = 1'b1;
          endcase
        end else if (op == OP_RTS) begin
          ctrl.stack_out_a = 1'b1; ctrl.load_pc = 1'b1; ctrl.pop = 1'b1;
          ctrl.clear = 1'b1;
        end else begin
          ctrl.clear = 1'b1;                   // undefined opcode: no-operation
        end
      end
    endcase
  end

endmodule
