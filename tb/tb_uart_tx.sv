// tb_uart_tx: serial transmission at 9600 baud by timing loops.
//
// A program sends the low byte of input port 1 as an 8N1 frame (start bit 0,
// eight data bits LSB first, stop bit 1) on output port 1 bit 0, timing each
// bit with a delay loop. One bit lasts 38 + 12*D cycles:
//   MOVE R0,R2 (4) + AND #1,R2 (6) + MOVE R2,[OUT1] (8) + ASHR R0,R0 (4)
//   + MOVE #D,R2 (6) + D x (ADD #-1,R2 (6) + BNZ (6)) - 2 + ADD #-1,R1 (6) + BNZ (6)
// With D = 431 a bit is 5210 cycles, 0.04 % from 9600 baud at a 50 MHz
// clock (5208.3 cycles). The testbench receives the frames with a UART model
// that samples at mid-bit from the falling edge of the start bit using the
// nominal 9600-baud bit time, and checks the bytes, the framing and that the
// output edges fall on whole multiples of the computed bit time.
// The microcontroller runs at its default sizes.
module tb_uart_tx;
  import ip_pkg::*;
  import ip_asm_pkg::*;

  localparam int D        = 431;
  localparam int BIT_CYC  = 38 + 12 * D;         // 5210
  localparam int CLK_HZ   = 50_000_000;
  localparam int BAUD     = 9600;
  localparam real NOM_CYC = real'(CLK_HZ) / BAUD; // 5208.3

  logic        clk = 1'b0, rst;
  logic        ld_we;
  logic [11:0] ld_addr;
  logic [15:0] ld_data, in0, in1, out0, out1, pc;
  logic [2:0]  step;
  logic        s_ovf, s_unf;
  int checks = 0, failures = 0;

  ip_mcu dut (.clk(clk), .rst(rst), .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
              .in_port0(in0), .in_port1(in1), .out_port0(out0), .out_port1(out1),
              .pc(pc), .step(step), .stack_overflow(s_ovf), .stack_underflow(s_unf));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] prog [$];
  longint t_rise;
  bit     got_rise = 0;

  always @(posedge out1[0]) if (!got_rise) begin t_rise = $time; got_rise = 1; end

  initial begin
    logic [7:0] bytes [3] = '{8'h55, 8'hA3, 8'h0F};
    logic [9:0] frame;
    longint t0;
    rst = 1; ld_we = 0; ld_addr = 0; ld_data = 0; in0 = 0; in1 = {8'h00, bytes[0]};
    prog = '{
      enc(OP_MOVE, 0, M2, 3, M0), 16'h0001,          // 0  START: MOVE #1,R3
      enc(OP_MOVE, 3, M0, 0, M3), OUT1,              // 2         MOVE R3,[OUT1]   idle
      enc(OP_MOVE, 0, M3, 0, M0), IN1,               // 4         MOVE [IN1],R0
      enc(OP_AND,  0, M2, 0, M0), 16'h00FF,          // 6         AND #FF,R0
      enc(OP_SHL,  0, M0, 0, M0),                    // 8         SHL R0,R0        start bit
      enc(OP_OR,   0, M2, 0, M0), 16'h0200,          // 9         OR #200,R0       stop bit
      enc(OP_MOVE, 0, M2, 1, M0), 16'd10,            // 11        MOVE #10,R1
      enc(OP_MOVE, 0, M0, 2, M0),                    // 13 BIT:   MOVE R0,R2
      enc(OP_AND,  0, M2, 2, M0), 16'h0001,          // 14        AND #1,R2
      enc(OP_MOVE, 2, M0, 0, M3), OUT1,              // 16        MOVE R2,[OUT1]
      enc(OP_ASHR, 0, M0, 0, M0),                    // 18        ASHR R0,R0
      enc(OP_MOVE, 0, M2, 2, M0), 16'(D),            // 19        MOVE #D,R2
      enc(OP_ADD,  0, M2, 2, M0), 16'hFFFF,          // 21 DLY:   ADD #-1,R2
      enc(OP_BR,   0, M0, 0, M0, C_NZ), 16'd21,      // 23        BNZ DLY
      enc(OP_ADD,  0, M2, 1, M0), 16'hFFFF,          // 25        ADD #-1,R1
      enc(OP_BR,   0, M0, 0, M0, C_NZ), 16'd13,      // 27        BNZ BIT
      enc(OP_BR,   0, M0, 0, M0, C_ALWAYS), 16'd0    // 29        BRA START
    };
    @(negedge clk);
    foreach (prog[i]) begin
      ld_we = 1; ld_addr = 12'(i); ld_data = prog[i]; @(negedge clk);
    end
    ld_we = 0; rst = 0;
    wait (out1[0] == 1'b1);
    foreach (bytes[k]) begin
      @(negedge out1[0]);                         // start bit
      t0 = $time;
      got_rise = 0;
      for (int b = 0; b < 10; b++) begin
        #(longint'((real'(b) + 0.5) * NOM_CYC * 10.0) - ($time - t0));
        frame[b] = out1[0];
      end
      // the program reads the next byte right after this stop bit
      if (k < 2) in1 = {8'h00, bytes[k + 1]};
      checks++;
      if (frame[0] != 1'b0 || frame[9] != 1'b1 || frame[8:1] != bytes[k]) begin
        failures++;
        $display("FAIL frame %0d: got %b, byte %h expected %h", k, frame, frame[8:1], bytes[k]);
      end else $display("received %h", frame[8:1]);
      // bit time: the first rising edge comes a whole number of bit times after the start edge
      checks++;
      if (!got_rise || (t_rise - t0) % (BIT_CYC * 10) != 0) begin
        failures++;
        $display("FAIL bit time: first rise %0d cycles after start, not a multiple of %0d",
                 (t_rise - t0) / 10, BIT_CYC);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
