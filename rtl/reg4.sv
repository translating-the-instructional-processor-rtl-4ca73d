// reg4: the 4 x 16 register file REGS of the Instructional Processor.
//
// Two read ports and one write port. Port 1 is addressed by Addr1 (the
// instruction's SRC_REG field) and drives BUS_A; port 2 is addressed by Addr2
// (DST_REG) and drives BUS_B. Reads are asynchronous and gated by their read
// enables; the write is synchronous on the rising clock edge and goes to
// Addr2, so a register-to-register operation reads Rd on port 2 and writes the
// result back to the same Rd in one step.
//
// As in the original design the read ports are bus drivers: the original
// floats an unread port to high impedance. Here an unread port outputs zero,
// and the data path ORs its bus sources together, which gives the same bus
// value as a tri-state bus with a single driver. The registers have no reset,
// as in the original.
module reg4 #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned NREGS  = 4
) (
  input  logic                     CLK,
  input  logic                     REGS_Read1,
  input  logic                     REGS_Read2,
  input  logic                     REGS_Write,
  input  logic [$clog2(NREGS)-1:0] Addr1,
  input  logic [$clog2(NREGS)-1:0] Addr2,
  input  logic [DATA_W-1:0]        Data_In,
  output logic [DATA_W-1:0]        Data_Out1,
  output logic [DATA_W-1:0]        Data_Out2
);

  logic [DATA_W-1:0] regs [NREGS];

  // asynchronous, enabled reads
  always_comb begin
    Data_Out1 = REGS_Read1 ? regs[Addr1] : '0;
    Data_Out2 = REGS_Read2 ? regs[Addr2] : '0;
  end

  // synchronous write
  always_ff @(posedge CLK) begin
    if (REGS_Write) regs[Addr2] <= Data_In;
  end

endmodule
