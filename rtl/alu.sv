// alu: combinational arithmetic logic unit of the Instructional Processor.
//
// Sits between the three buses: operands arrive on BUS_A (a, the source
// operand) and BUS_B (b, the destination operand), the result leaves on BUS_C
// (y). The operation code is the instruction opcode itself for data
// operations (the control unit sets ALU_OP = OP, as in the original), plus
// PASSB, used by the control unit to move an address from BUS_B.
//
//   MOVE y = a          INV  y = ~a         SHL y = a << 1   ASHR y = a >>> 1
//   ADD  y = b + a      SUB  y = b - a      AND y = b & a    OR   y = b | a
//   PASSB y = b
//
// Flags {C,V,N,Z}: Z and N from y; C is the carry out of ADD, the borrow of
// SUB, or the bit shifted out by SHL / ASHR; V is signed overflow of ADD / SUB.
// The set of operations beyond MOVE, INV, SHL, ASHR and ADD, and the flag
// definitions, are this implementation's choice. Purely combinational.
module alu #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  ip_pkg::alu_op_e   op,
  output logic [DATA_W-1:0] y,
  output ip_pkg::status_t   flags
);

  import ip_pkg::*;

  logic [DATA_W:0] wide;

  always_comb begin
    wide    = '0;
    flags   = '0;
    y       = '0;
    unique case (op)
      ALU_MOVE:  y = a;
      ALU_INV:   y = ~a;
      ALU_SHL: begin
        y       = {a[DATA_W-2:0], 1'b0};
        flags.c = a[DATA_W-1];
      end
      ALU_ASHR: begin
        y       = {a[DATA_W-1], a[DATA_W-1:1]};
        flags.c = a[0];
      end
      ALU_ADD: begin
        wide    = {1'b0, b} + {1'b0, a};
        y       = wide[DATA_W-1:0];
        flags.c = wide[DATA_W];
        flags.v = (a[DATA_W-1] == b[DATA_W-1]) && (y[DATA_W-1] != b[DATA_W-1]);
      end
      ALU_SUB: begin
        wide    = {1'b0, b} - {1'b0, a};
        y       = wide[DATA_W-1:0];
        flags.c = wide[DATA_W];
        flags.v = (a[DATA_W-1] != b[DATA_W-1]) && (y[DATA_W-1] != b[DATA_W-1]);
      end
      ALU_AND:   y = b & a;
      ALU_OR:    y = b | a;
      ALU_PASSB: y = b;
      default:   y = a;
    endcase
    flags.n = y[DATA_W-1];
    flags.z = (y == '0);
  end

endmodule
