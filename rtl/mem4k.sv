// mem4k: main MEMORY of the Instructional Processor, 4K words of 16 bits.
//
// A word array with one synchronous write port and one read port. The read
// is combinational at `addr` (the MAR) and is captured by the MDR in the data
// path, so memory plus MDR behave as a block RAM with a registered read: the
// word addressed in one step is in the MDR at the start of the next.
// Writes take `wdata` (the MDR) on the rising edge when `we` is high.
//
// A second write port (ld_*) loads a program while the processor is held in
// reset; it has priority over `we`. The original loads its program from a file
// at elaboration; INIT_FILE (a text file of binary words, one per line, as read
// by $readmemb) still allows that, and may hold fewer words than the memory.
// All words start at zero first, so the memory is always fully initialised.
module mem4k #(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned WORDS     = 4096,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [DATA_W-1:0]        wdata,
  output logic [DATA_W-1:0]        rdata,
  input  logic                     ld_we,
  input  logic [$clog2(WORDS)-1:0] ld_addr,
  input  logic [DATA_W-1:0]        ld_data
);

  logic [DATA_W-1:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemb(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (ld_we)   mem[ld_addr] <= ld_data;
    else if (we) mem[addr]    <= wdata;
  end

  assign rdata = mem[addr];

endmodule
