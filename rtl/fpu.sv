// fpu: floating-point unit of one processing element.
//
// Holds four pipelined units side by side, as in the published FPU: an adder
// and a subtractor (three stages each), a multiplier (three stages) and a
// divider (28 stages). All four receive the source operands s1 and s2 every
// cycle; the output multiplexer picks the unit named by op, which the
// sequencer holds constant for the whole instruction. FOP_PASS forwards s1
// unchanged and without delay; stores and mesh sends use it to bring a
// register onto the destination bus, the FPU's pass-through role.
// Latency: 3 cycles for add, sub and mul, 28 for div, 0 for pass.
module fpu
  import simd_pkg::*;
(
  input  logic        clk,
  input  fpu_op_t     op,
  input  logic [31:0] s1,
  input  logic [31:0] s2,
  output logic [31:0] y
);

  logic [31:0] y_add, y_sub, y_mul, y_div;

  fp_addsub #(.SUB(1'b0)) u_add (.clk, .a(s1), .b(s2), .y(y_add));
  fp_addsub #(.SUB(1'b1)) u_sub (.clk, .a(s1), .b(s2), .y(y_sub));
  fp_mul                  u_mul (.clk, .a(s1), .b(s2), .y(y_mul));
  fp_div                  u_div (.clk, .a(s1), .b(s2), .y(y_div));

  always_comb begin
    unique case (op)
      FOP_ADD: y = y_add;
      FOP_SUB: y = y_sub;
      FOP_MUL: y = y_mul;
      FOP_DIV: y = y_div;
      default: y = s1;
    endcase
  end

endmodule
