// tb_pwm: pulse-width modulation application on the microcontroller.
//
// A software PWM program reads a duty value from input port 0 and drives
// output port 0 bit 15 high for `duty` out of PERIOD loop iterations. The loop
// is branch-free (the sign of count - duty is the output bit), so every
// iteration lasts the same 44 cycles:
//   MOVE R1,R2 (4) + SUB R0,R2 (4) + AND #,R2 (6) + MOVE R2,[OUT0] (8)
//   + ADD #1,R1 (6) + MOVE R1,R2 (4) + SUB #,R2 (6) + BNZ (6 taken)
// One PWM period is PERIOD*44 + 18 cycles (the untaken BNZ is 2 cycles
// shorter, then BRA 6 + MOVE [IN0] 8 + MOVE # 6). The testbench measures the
// high time and the period of the output for several duty values and checks
// them against these figures. The microcontroller runs at its default sizes.
module tb_pwm;
  import ip_pkg::*;
  import ip_asm_pkg::*;

  localparam int PERIOD = 16;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] prog [$];

  initial begin
    int duties [3] = '{3, 8, 13};
    longint t, t_rise, t_fall, t_rise2;
    rst = 1; ld_we = 0; ld_addr = 0; ld_data = 0; in0 = 16'(duties[0]); in1 = 0;
    prog = '{
      enc(OP_MOVE, 0, M3, 0, M0), IN0,               // 0  START: MOVE [IN0],R0
      enc(OP_MOVE, 0, M2, 1, M0), 16'h0000,          // 2         MOVE #0,R1
      enc(OP_MOVE, 1, M0, 2, M0),                    // 4  LOOP:  MOVE R1,R2
      enc(OP_SUB,  0, M0, 2, M0),                    // 5         SUB R0,R2
      enc(OP_AND,  0, M2, 2, M0), 16'h8000,          // 6         AND #8000,R2
      enc(OP_MOVE, 2, M0, 0, M3), OUT0,              // 8         MOVE R2,[OUT0]
      enc(OP_ADD,  0, M2, 1, M0), 16'h0001,          // 10        ADD #1,R1
      enc(OP_MOVE, 1, M0, 2, M0),                    // 12        MOVE R1,R2
      enc(OP_SUB,  0, M2, 2, M0), 16'(PERIOD),       // 13        SUB #PERIOD,R2
      enc(OP_BR,   0, M0, 0, M0, C_NZ), 16'd4,       // 15        BNZ LOOP
      enc(OP_BR,   0, M0, 0, M0, C_ALWAYS), 16'd0    // 17        BRA START
    };
    @(negedge clk);
    foreach (prog[i]) begin
      ld_we = 1; ld_addr = 12'(i); ld_data = prog[i]; @(negedge clk);
    end
    ld_we = 0; rst = 0;
    t = 0;
    foreach (duties[k]) begin
      in0 = 16'(duties[k]);
      // skip the period in which the duty changed, then measure one full period
      repeat (2) @(posedge out0[15]);
      t_rise = $time;
      @(negedge out0[15]); t_fall = $time;
      @(posedge out0[15]); t_rise2 = $time;
      checks++;
      if ((t_fall - t_rise) / 10 != duties[k] * 44) begin
        failures++;
        $display("FAIL duty %0d: high for %0d cycles, expected %0d", duties[k], (t_fall - t_rise) / 10, duties[k] * 44);
      end
      checks++;
      if ((t_rise2 - t_rise) / 10 != PERIOD * 44 + 18) begin
        failures++;
        $display("FAIL duty %0d: period %0d cycles, expected %0d", duties[k], (t_rise2 - t_rise) / 10, PERIOD * 44 + 18);
      end
      $display("duty %0d/%0d: high %0d cycles of %0d", duties[k], PERIOD, (t_fall - t_rise) / 10, (t_rise2 - t_rise) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
