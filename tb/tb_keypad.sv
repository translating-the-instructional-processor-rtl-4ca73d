// tb_keypad: time-multiplexed scanning of a 4 x 4 hex keypad.
//
// A program drives the four column lines (output port 0 bits 3:0, active
// low) one at a time and reads the four row lines (input port 0 bits 3:0,
// active low). When a row answers it converts the position to the key code
// row*4 + column and writes it, with bit 15 set as a valid flag, to output
// port 1. The testbench models the keypad (a pressed key connects its row to
// its column), presses each of the 16 keys in random order and checks the
// reported code within a bounded number of cycles. Default sizes.
module tb_keypad;
  import ip_pkg::*;
  import ip_asm_pkg::*;

  logic        clk = 1'b0, rst;
  logic        ld_we;
  logic [11:0] ld_addr;
  logic [15:0] ld_data, in0, in1, out0, out1, pc;
  logic [2:0]  step;
  logic        s_ovf, s_unf;
  int checks = 0, failures = 0;
  int key = -1;                      // pressed key, -1 = none

  ip_mcu dut (.clk(clk), .rst(rst), .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
              .in_port0(in0), .in_port1(in1), .out_port0(out0), .out_port1(out1),
              .pc(pc), .step(step), .stack_overflow(s_ovf), .stack_underflow(s_unf));

  always #5 clk = ~clk;

  // keypad: row r pulled low when key (r, c) is pressed and column c is low
  always_comb begin
    in0 = 16'h000F;
    if (key >= 0 && out0[key % 4] == 1'b0) in0[key / 4] = 1'b0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] prog [$];

  initial begin
    int order [16];
    rst = 1; ld_we = 0; ld_addr = 0; ld_data = 0; in1 = 0;
    prog = '{
      enc(OP_MOVE, 0, M2, 3, M0), 16'h0000,          // 0  START: MOVE #0,R3   column index
      enc(OP_MOVE, 0, M2, 1, M0), 16'h0001,          // 2         MOVE #1,R1   column bit
      enc(OP_INV,  1, M0, 2, M0),                    // 4  COL:   INV R1,R2
      enc(OP_MOVE, 2, M0, 0, M3), OUT0,              // 5         MOVE R2,[OUT0]
      enc(OP_MOVE, 0, M3, 0, M0), IN0,               // 7         MOVE [IN0],R0
      enc(OP_INV,  0, M0, 0, M0),                    // 9         INV R0,R0
      enc(OP_AND,  0, M2, 0, M0), 16'h000F,          // 10        AND #F,R0    rows pressed
      enc(OP_BR,   0, M0, 0, M0, C_NZ), 16'd25,      // 12        BNZ FOUND
      enc(OP_ADD,  0, M2, 3, M0), 16'h0001,          // 14        ADD #1,R3
      enc(OP_SHL,  1, M0, 1, M0),                    // 16        SHL R1,R1
      enc(OP_MOVE, 1, M0, 2, M0),                    // 17        MOVE R1,R2
      enc(OP_SUB,  0, M2, 2, M0), 16'h0010,          // 18        SUB #10,R2
      enc(OP_BR,   0, M0, 0, M0, C_NZ), 16'd4,       // 20        BNZ COL
      enc(OP_BR,   0, M0, 0, M0, C_ALWAYS), 16'd0,   // 22        BRA START
      enc(opcode_e'(15), 0, M0, 0, M0),                         // 24        (unused)
      enc(OP_ASHR, 0, M0, 0, M0),                    // 25 FOUND: ASHR R0,R0   C = row bit
      enc(OP_BR,   0, M0, 0, M0, C_C), 16'd32,       // 26        BC GOT
      enc(OP_ADD,  0, M2, 3, M0), 16'h0004,          // 28        ADD #4,R3
      enc(OP_BR,   0, M0, 0, M0, C_ALWAYS), 16'd25,  // 30        BRA FOUND
      enc(OP_OR,   0, M2, 3, M0), 16'h8000,          // 32 GOT:   OR #8000,R3
      enc(OP_MOVE, 3, M0, 0, M3), OUT1,              // 34        MOVE R3,[OUT1]
      enc(OP_BR,   0, M0, 0, M0, C_ALWAYS), 16'd0    // 36        BRA START
    };
    @(negedge clk);
    foreach (prog[i]) begin
      ld_we = 1; ld_addr = 12'(i); ld_data = prog[i]; @(negedge clk);
    end
    ld_we = 0; rst = 0;
    foreach (order[i]) order[i] = i;
    order.shuffle();
    repeat (300) @(posedge clk);
    checks++;
    if (out1 != 16'h0) begin failures++; $display("FAIL key reported with no key pressed"); end
    foreach (order[i]) begin
      int n;
      key = order[i];
      n = 0;
      while (out1 != (16'h8000 | 16'(key)) && n < 1000) begin @(posedge clk); n++; end
      checks++;
      if (n >= 1000) begin failures++; $display("FAIL key %0d: out1 = %h", key, out1); end
      else $display("key %0d reported after %0d cycles", key, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
