// datapath: three-bus 16-bit data path of the Instructional Processor.
//
// BUS_A and BUS_B carry operands into the ALU and BUS_C carries its result
// to every register that can be loaded. Sources of BUS_A: register-file port 1
// (SRC_REG), PC, MDR, the top of the subroutine stack. Sources of BUS_B:
// register-file port 2 (DST_REG), MDR. Destinations of BUS_C: the register
// file (at DST_REG), PC, IR, MAR, MDR. STATUS loads the ALU flags. The PC has
// its own incrementer. The MDR loads either the memory read data (mem_read)
// or BUS_C (load_mdr) and is the memory write data; the MAR addresses memory
// and I/O. JSR pushes the PC on the stack in the same edge that loads the
// target, so the stack holds the return address.
//
// The original builds BUS_A and BUS_B from tri-state buffers. A two-state
// description has no high impedance, so here each bus is the OR of its
// sources, each zero unless enabled; with one enabled source at a time,
// which an assertion checks, this is the same logic function as the
// tri-state bus. All registers load on the rising clock edge under the
// control word of the current step; rst (synchronous) clears PC, IR, MAR,
// MDR, STATUS and the stack. Which register drives which bus is this
// implementation's choice.
module datapath
  import ip_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  ctrl_t              ctrl,
  input  logic [DATA_W-1:0]  mem_rdata,
  output logic [DATA_W-1:0]  ir,
  output status_t            status,
  output logic [DATA_W-1:0]  pc,
  output logic [DATA_W-1:0]  mar,
  output logic [DATA_W-1:0]  mdr,
  output logic               stack_overflow,
  output logic               stack_underflow
);

  logic [DATA_W-1:0] bus_a, bus_b, bus_c;
  logic [DATA_W-1:0] regs_out1, regs_out2, stack_top;
  status_t           alu_flags;

  // Register file: port 1 at SRC_REG = IR[10:9], port 2 / write at DST_REG = IR[6:5]
  reg4 #(.DATA_W(DATA_W), .NREGS(4)) u_regs (
    .CLK       (clk),
    .REGS_Read1(ctrl.regs_read1),
    .REGS_Read2(ctrl.regs_read2),
    .REGS_Write(ctrl.regs_write),
    .Addr1     (ir[10:9]),
    .Addr2     (ir[6:5]),
    .Data_In   (bus_c),
    .Data_Out1 (regs_out1),
    .Data_Out2 (regs_out2)
  );

  // Buses: OR of enabled sources (stand-in for the tri-state buffers)
  assign bus_a = regs_out1
               | (ctrl.pc_out_a    ? pc        : '0)
               | (ctrl.mdr_out_a   ? mdr       : '0)
               | (ctrl.stack_out_a ? stack_top : '0);
  assign bus_b = regs_out2
               | (ctrl.mdr_out_b   ? mdr       : '0);

  alu #(.DATA_W(DATA_W)) u_alu (
    .a    (bus_a),
    .b    (bus_b),
    .op   (ctrl.alu_op),
    .y    (bus_c),
    .flags(alu_flags)
  );

  stack #(.DATA_W(DATA_W), .DEPTH(STACK_DEPTH)) u_stack (
    .clk      (clk),
    .rst      (rst),
    .push     (ctrl.push),
    .pop      (ctrl.pop),
    .din      (pc),
    .top      (stack_top),
    .empty    (),
    .full     (),
    .overflow (stack_overflow),
    .underflow(stack_underflow)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      ir     <= '0;
      mar    <= '0;
      mdr    <= '0;
      status <= '0;
    end else begin
      if (ctrl.load_pc)       pc  <= bus_c;
      else if (ctrl.inc_pc)   pc  <= pc + 1'b1;
      if (ctrl.load_ir)       ir  <= bus_c;
      if (ctrl.load_mar)      mar <= bus_c;
      if (ctrl.mem_read)      mdr <= mem_rdata;
      else if (ctrl.load_mdr) mdr <= bus_c;
      if (ctrl.load_status)   status <= alu_flags;
    end
  end

  // One driver per bus, as the tri-state buses require.
  a_bus_a_one_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.regs_read1, ctrl.pc_out_a, ctrl.mdr_out_a, ctrl.stack_out_a}));
  a_bus_b_one_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.regs_read2, ctrl.mdr_out_b}));

endmodule
