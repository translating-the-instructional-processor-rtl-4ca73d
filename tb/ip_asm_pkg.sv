// ip_asm_pkg: instruction encoding helpers for the application testbenches.
// enc() builds an instruction word in the microcontroller's format
// {OP[15:12], 0, SRC_REG[10:9], SRC_MODE[8:7], DST_REG[6:5], DST_MODE[4:3], COND[2:0]};
// the I/O addresses are those of the memory map.
package ip_asm_pkg;
  import ip_pkg::*;

  localparam logic [15:0] IN0  = 16'hFFF0;
  localparam logic [15:0] IN1  = 16'hFFF1;
  localparam logic [15:0] OUT0 = 16'hFFF8;
  localparam logic [15:0] OUT1 = 16'hFFF9;

  function automatic logic [15:0] enc(input opcode_e op, input logic [1:0] sreg, input mode_e smode,
                                      input logic [1:0] dreg, input mode_e dmode,
                                      input cond_e cnd = C_ALWAYS);
    return {op, 1'b0, sreg, smode, dreg, dmode, cnd};
  endfunction
endpackage
