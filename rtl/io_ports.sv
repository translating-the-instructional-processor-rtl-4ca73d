// io_ports: memory-mapped input/output ports of the microcontroller.
//
// The processor reaches its ports with ordinary memory reads and writes.
// Addresses (MAR values):
//   0xFFF0  input port 0      (read)
//   0xFFF1  input port 1      (read)
//   0xFFF8  output port 0     (write; reads back the last value written)
//   0xFFF9  output port 1     (write; reads back the last value written)
// `sel` is high for any address in 0xFFF0..0xFFFF; the microcontroller then
// takes read data from `rdata` instead of the main memory and suppresses the
// memory write. Unused addresses in that range read as zero. Output ports
// update on the rising edge of a write and clear on synchronous reset.
// The original uses memory-mapped I/O; the number of ports and their
// addresses are this implementation's choice.
module io_ports #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [15:0]       addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic              sel,
  input  logic [DATA_W-1:0] in_port0,
  input  logic [DATA_W-1:0] in_port1,
  output logic [DATA_W-1:0] out_port0,
  output logic [DATA_W-1:0] out_port1
);

  localparam logic [15:0] A_IN0  = 16'hFFF0;
  localparam logic [15:0] A_IN1  = 16'hFFF1;
  localparam logic [15:0] A_OUT0 = 16'hFFF8;
  localparam logic [15:0] A_OUT1 = 16'hFFF9;

  assign sel = (addr[15:4] == 12'hFFF);

  always_comb begin
    case (addr)
      A_IN0:   rdata = in_port0;
      A_IN1:   rdata = in_port1;
      A_OUT0:  rdata = out_port0;
      A_OUT1:  rdata = out_port1;
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_port0 <= '0;
      out_port1 <= '0;
    end else if (we) begin
      if (addr == A_OUT0) out_port0 <= wdata;
      if (addr == A_OUT1) out_port1 <= wdata;
    end
  end

endmodule
