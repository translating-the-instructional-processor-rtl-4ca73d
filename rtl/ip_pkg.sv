// ip_pkg: types and constants shared by the Instructional Processor.
//
// The processor is a 16-bit machine with a three-bus data path, a 4 x 16
// register file and a step-counter control unit. This package holds the
// instruction format, the opcode / addressing-mode / condition encodings, the
// time-step names and the control word that the control signal encoder sends
// to the data path.
//
// Instruction word (one word, optionally followed by one extension word):
//   [15:12] OP        opcode; for data operations it is also the ALU operation
//   [11]    reserved  (0)
//   [10:9]  SRC_REG   source register        (field position as in the original)
//   [8:7]   SRC_MODE  source addressing mode
//   [6:5]   DST_REG   destination register   (field position as in the original)
//   [4:3]   DST_MODE  destination addressing mode
//   [2:0]   COND      branch condition (BR only)
// Only the SRC_REG and DST_REG positions come from the original design; the
// rest of the layout and all encodings are this implementation's choice.
package ip_pkg;

  localparam int unsigned DATA_W   = 16;
  localparam int unsigned NSTEPS   = 8;    // T0..T7

  // Opcodes. Values 0..7 double as ALU operations (ALU_OP = OP).
  typedef enum logic [3:0] {
    OP_MOVE = 4'd0,
    OP_INV  = 4'd1,
    OP_SHL  = 4'd2,
    OP_ASHR = 4'd3,
    OP_ADD  = 4'd4,
    OP_SUB  = 4'd5,
    OP_AND  = 4'd6,
    OP_OR   = 4'd7,
    OP_BR   = 4'd8,
    OP_JSR  = 4'd9,
    OP_RTS  = 4'd10
  } opcode_e;

  // ALU operations: the first eight equal the data opcodes; PASSB moves
  // BUS_B to BUS_C for address transfers.
  typedef enum logic [3:0] {
    ALU_MOVE  = 4'd0,   // y = a
    ALU_INV   = 4'd1,   // y = ~a
    ALU_SHL   = 4'd2,   // y = a << 1
    ALU_ASHR  = 4'd3,   // y = a >>> 1
    ALU_ADD   = 4'd4,   // y = b + a
    ALU_SUB   = 4'd5,   // y = b - a
    ALU_AND   = 4'd6,   // y = b & a
    ALU_OR    = 4'd7,   // y = b | a
    ALU_PASSB = 4'd8    // y = b
  } alu_op_e;

  // Addressing modes.
  typedef enum logic [1:0] {
    M0 = 2'd0,   // register          Rn
    M1 = 2'd1,   // register indirect [Rn]
    M2 = 2'd2,   // immediate         value in next word (source only)
    M3 = 2'd3    // absolute          [address in next word]
  } mode_e;

  // Branch conditions (BR). BRA = C_ALWAYS, BNZ = C_NZ.
  typedef enum logic [2:0] {
    C_ALWAYS = 3'd0,
    C_Z      = 3'd1,
    C_NZ     = 3'd2,
    C_N      = 3'd3,
    C_NN     = 3'd4,
    C_C      = 3'd5,
    C_NC     = 3'd6,
    C_V      = 3'd7
  } cond_e;

  // Time steps of the step counter.
  typedef enum logic [2:0] {
    T0 = 3'd0, T1 = 3'd1, T2 = 3'd2, T3 = 3'd3,
    T4 = 3'd4, T5 = 3'd5, T6 = 3'd6, T7 = 3'd7
  } step_e;

  // STATUS register / ALU flags.
  typedef struct packed {
    logic c;   // carry / borrow / shifted-out bit
    logic v;   // signed overflow
    logic n;   // negative
    logic z;   // zero
  } status_t;

  // Control word issued by the control signal encoder each step.
  typedef struct packed {
    logic    regs_read1;   // REGS port 1 (SRC_REG) drives BUS_A
    logic    regs_read2;   // REGS port 2 (DST_REG) drives BUS_B
    logic    regs_write;   // REGS[DST_REG] <= BUS_C
    logic    pc_out_a;     // PC drives BUS_A
    logic    mdr_out_a;    // MDR drives BUS_A
    logic    mdr_out_b;    // MDR drives BUS_B
    logic    stack_out_a;  // stack top drives BUS_A
    alu_op_e alu_op;       // ALU operation
    logic    load_pc;      // PC <= BUS_C
    logic    inc_pc;       // PC <= PC + 1
    logic    load_ir;      // IR <= BUS_C
    logic    load_mar;     // MAR <= BUS_C
    logic    load_mdr;     // MDR <= BUS_C
    logic    load_status;  // STATUS <= ALU flags
    logic    mem_read;     // MDR <= MEM/IO[MAR]
    logic    mem_write;    // MEM/IO[MAR] <= MDR
    logic    push;         // stack <= PC
    logic    pop;          // drop stack top
    logic    clear;        // step counter back to T0
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

endpackage
