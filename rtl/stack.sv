// stack: the subroutine STACK of the Instructional Processor.
//
// A hardware last-in first-out store for return addresses. JSR pushes the
// program counter (din) and RTS pops it back; the top entry is always visible
// on `top`, from which the data path puts it on BUS_A. Push and pop take
// effect on the rising clock edge; a push in the same cycle as a pop replaces
// the top entry. A push to a full stack is dropped and a pop from an empty
// stack does nothing; each sets a sticky flag (overflow / underflow) until
// reset. The original only names the stack: its depth, its error handling and
// these flags are this implementation's choices. rst (synchronous) empties it.
module stack #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              push,
  input  logic              pop,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] top,
  output logic              empty,
  output logic              full,
  output logic              overflow,
  output logic              underflow
);

  localparam int unsigned PW = $clog2(DEPTH + 1);

  logic [DATA_W-1:0] mem [DEPTH];
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [PW-1:0]     count;   // number of entries
  logic [IW-1:0]     top_idx, wr_idx;

  assign top_idx = IW'(count - 1'b1);
  assign wr_idx  = IW'(count);

  assign empty = (count == '0);
  assign full  = (count == PW'(DEPTH));
  assign top   = empty ? '0 : mem[top_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (push && pop) begin
      if (empty) mem[0] <= din;
      else       mem[top_idx] <= din;
      if (empty) count <= count + 1'b1;
    end else if (push) begin
      if (full) overflow <= 1'b1;
      else begin
        mem[wr_idx] <= din;
        count      <= count + 1'b1;
      end
    end else if (pop) begin
      if (empty) underflow <= 1'b1;
      else       count     <= count - 1'b1;
    end
  end

endmodule
