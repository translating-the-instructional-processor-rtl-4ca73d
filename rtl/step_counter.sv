// step_counter: time-step generator of the control unit.
//
// Counts the time steps T0, T1, ... T7 of an instruction, one per clock. The
// control signal encoder asserts `clear` in the last step of every fetch and
// execute sequence, so the next clock starts the next instruction at T0. With
// no clear after T7 it wraps to T0 (never used by the encoder). rst is
// synchronous and returns to T0. The eight steps follow the original; the
// wrap behaviour is this implementation's choice.
module step_counter #(
  parameter int unsigned NSTEPS = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clear,
  output logic [$clog2(NSTEPS)-1:0] step
);

  always_ff @(posedge clk) begin
    if (rst || clear)                       step <= '0;
    else if (step == $bits(step)'(NSTEPS-1)) step <= '0;
    else                                    step <= step + 1'b1;
  end

endmodule
