// ip_mcu: the Instructional Processor microcontroller.
//
// One chip with the processor (three-bus data path and step-counter control
// unit), the 4K x 16 main memory and memory-mapped I/O ports. Each
// instruction runs as a sequence of time steps T0..T7 (one clock each); the
// control unit decodes IR, step and STATUS into a control word for the data
// path. The MAR addresses either the main memory (0x0000-0x0FFF) or the I/O
// ports (0xFFF0-0xFFFF); other addresses read as zero and ignore writes.
//
// Interface: clk, rst (synchronous, active high). While rst is high a program
// is written into memory through ld_we / ld_addr / ld_data; when rst falls
// the processor fetches from address 0. in_port0/1 and out_port0/1 are the
// I/O ports. pc and step are brought out for observation, and the stack's
// sticky overflow / underflow flags as error indicators.
// The memory map and the load port are this implementation's choices.
module ip_mcu
  import ip_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 4096,
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         ld_we,
  input  logic [$clog2(MEM_WORDS)-1:0] ld_addr,
  input  logic [DATA_W-1:0]            ld_data,
  input  logic [DATA_W-1:0]            in_port0,
  input  logic [DATA_W-1:0]            in_port1,
  output logic [DATA_W-1:0]            out_port0,
  output logic [DATA_W-1:0]            out_port1,
  output logic [DATA_W-1:0]            pc,
  output logic [2:0]                   step,
  output logic                         stack_overflow,
  output logic                         stack_underflow
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  ctrl_t             ctrl;
  logic [DATA_W-1:0] ir, mar, mdr, mem_rdata, io_rdata, rdata;
  status_t           status;
  logic              io_sel, mem_sel;

  step_counter #(.NSTEPS(NSTEPS)) u_step (
    .clk  (clk),
    .rst  (rst),
    .clear(ctrl.clear),
    .step (step)
  );

  control_unit u_cu (
    .step  (step_e'(step)),
    .ir    (ir),
    .status(status),
    .ctrl  (ctrl)
  );

  datapath #(.STACK_DEPTH(STACK_DEPTH)) u_dp (
    .clk            (clk),
    .rst            (rst),
    .ctrl           (ctrl),
    .mem_rdata      (rdata),
    .ir             (ir),
    .status         (status),
    .pc             (pc),
    .mar            (mar),
    .mdr            (mdr),
    .stack_overflow (stack_overflow),
    .stack_underflow(stack_underflow)
  );

  assign mem_sel = (mar[DATA_W-1:AW] == '0);

  mem4k #(.DATA_W(DATA_W), .WORDS(MEM_WORDS)) u_mem (
    .clk    (clk),
    .we     (ctrl.mem_write && mem_sel && !rst),
    .addr   (mar[AW-1:0]),
    .wdata  (mdr),
    .rdata  (mem_rdata),
    .ld_we  (ld_we && rst),
    .ld_addr(ld_addr),
    .ld_data(ld_data)
  );

  io_ports #(.DATA_W(DATA_W)) u_io (
    .clk      (clk),
    .rst      (rst),
    .addr     (mar),
    .we       (ctrl.mem_write),
    .wdata    (mdr),
    .rdata    (io_rdata),
    .sel      (io_sel),
    .in_port0 (in_port0),
    .in_port1 (in_port1),
    .out_port0(out_port0),
    .out_port1(out_port1)
  );

  assign rdata = mem_sel ? mem_rdata : io_sel ? io_rdata : '0;

endmodule
