// tb_mem4k: self-checking testbench for the 4K x 16 main memory.
// Checks the all-zero initial contents, initialisation from a short binary
// file (the remaining words stay zero), writes through the load port and the
// processor port (load port wins a collision), that a write is visible only
// after its edge, and random traffic over the whole address space against a
// reference array.
module tb_mem4k;
  localparam int WORDS = 4096;
  logic        clk = 1'b0;
  logic        we, ld_we;
  logic [11:0] addr, ld_addr;
  logic [15:0] wdata, ld_data, rdata;
  logic [15:0] model [WORDS];
  int checks = 0, failures = 0;

  // second instance initialised from a short binary file; the rest stays zero
  logic [11:0] i_addr;
  logic [15:0] i_rdata;
  mem4k #(.INIT_FILE("tb/mem4k_init.mem")) dut_init (.clk(clk), .we(1'b0), .addr(i_addr), .wdata(16'h0),
    .rdata(i_rdata), .ld_we(1'b0), .ld_addr(12'h0), .ld_data(16'h0));

  mem4k dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata),
             .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data));

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL %s at %h: got %h expected %h", what, addr, rdata, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ld_we = 0; addr = 0; ld_addr = 0; wdata = 0; ld_data = 0;
    for (int i = 0; i < WORDS; i++) model[i] = 16'h0;
    for (int i = 0; i < WORDS; i += 257) begin addr = 12'(i); #1; check(16'h0, "initial zero"); end
    begin
      logic [15:0] init_words [4] = '{16'h0101, 16'hABCD, 16'hFFFF, 16'h0007};
      for (int i = 0; i < 8; i++) begin
        i_addr = 12'(i); #1;
        checks++;
        if (i_rdata !== ((i < 4) ? init_words[i] : 16'h0)) begin
          failures++; $display("FAIL init file word %0d = %h", i, i_rdata);
        end
      end
      i_addr = 12'hFFF; #1; checks++;
      if (i_rdata !== 16'h0) begin failures++; $display("FAIL init file: last word %h", i_rdata); end
    end
    // load port
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 12'(i * 61); ld_data = 16'(i * 7 + 3);
      @(posedge clk); model[ld_addr] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 64; i++) begin addr = 12'(i * 61); #1; check(model[addr], "load port"); end
    // collision: load port has priority
    @(negedge clk); ld_we = 1; we = 1; ld_addr = 12'h010; addr = 12'h010; ld_data = 16'h1111; wdata = 16'h2222;
    @(posedge clk); model[12'h010] = 16'h1111;
    @(negedge clk); ld_we = 0; we = 0; #1; check(16'h1111, "load port priority");
    // write visible only after edge
    @(negedge clk); we = 1; addr = 12'hFFF; wdata = 16'hBEEF; #1;
    check(model[12'hFFF], "before edge");
    @(posedge clk); model[12'hFFF] = 16'hBEEF; #1; check(16'hBEEF, "after edge");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 12'($urandom); wdata = 16'($urandom); #1;
      check(model[addr], "random read");
      @(posedge clk); if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
