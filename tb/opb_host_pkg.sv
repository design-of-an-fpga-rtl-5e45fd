// opb_host_pkg: program text and encoders shared by the system testbenches.
//
// Builds instruction words in the machine's two formats:
//   register-register: opcode[31:26] src1[25:21] src2[20:16] dst[15:11] mask[10:0]
//   immediate:         opcode[31:26] addr[25:16]            reg[15:11] mask[10:0]
package opb_host_pkg;
  import simd_pkg::*;

  function automatic logic [31:0] rr(input logic [5:0] op, input int s1, input int s2,
                                     input int d, input logic [10:0] mask = '0);
    return {op, 5'(s1), 5'(s2), 5'(d), mask};
  endfunction

  function automatic logic [31:0] im(input logic [5:0] op, input int addr, input int r,
                                     input logic [10:0] mask = '0);
    return {op, 10'(addr), 5'(r), mask};
  endfunction

endpackage
