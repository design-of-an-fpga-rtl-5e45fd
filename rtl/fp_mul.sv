// fp_mul: three-stage pipelined IEEE-754 single-precision multiplier.
//
// y = a * b, three clock edges after a and b are presented; a new operation
// may start every cycle.
//   Stage 1: split both operands into sign, exponent and mantissa with the
//            hidden '1' restored.
//   Stage 2: sign = XOR of the signs, exponent = sum of the exponents less
//            the bias, mantissa = upper part of the 48-bit mantissa product.
//   Stage 3: normalise mantissa and exponent and pack the result.
// The stages follow the published multiplier. This design keeps the upper 25
// product bits in stage 2 (one more than the 24 the normalised mantissa
// needs) so that stage 3 can normalise a product below 2 without losing its
// last bit; the result is truncated. A zero or denormal operand gives zero,
// exponent overflow gives infinity, underflow gives zero.
module fp_mul (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  // stage 1: unpack
  logic        s1_sx, s1_sy, s1_zero;
  logic [7:0]  s1_ex, s1_ey;
  logic [23:0] s1_mx, s1_my;

  always_ff @(posedge clk) begin
    s1_sx   <= a[31];
    s1_sy   <= b[31];
    s1_ex   <= a[30:23];
    s1_ey   <= b[30:23];
    s1_mx   <= {1'b1, a[22:0]};
    s1_my   <= {1'b1, b[22:0]};
    s1_zero <= (a[30:23] == 8'd0) || (b[30:23] == 8'd0);
  end

  // stage 2: sign, exponent sum, mantissa product
  logic [47:0] prod;
  assign prod = s1_mx * s1_my;

  logic              s2_sign, s2_zero;
  logic signed [9:0] s2_exp;
  logic [24:0]       s2_man;

  always_ff @(posedge clk) begin
    s2_sign <= s1_sx ^ s1_sy;
    s2_exp  <= $signed({2'b00, s1_ex}) + $signed({2'b00, s1_ey}) - 10'sd127;
    s2_man  <= prod[47:23];
    s2_zero <= s1_zero;
  end

  // stage 3: normalise and pack
  logic [22:0]       frac;
  logic signed [9:0] exp_n;
  logic [31:0]       res;

  always_comb begin
    if (s2_man[24]) begin
      frac  = s2_man[23:1];
      exp_n = s2_exp + 10'sd1;
    end else begin
      frac  = s2_man[22:0];
      exp_n = s2_exp;
    end
    if (s2_zero || exp_n <= 10'sd0) res = {s2_sign, 31'd0};
    else if (exp_n >= 10'sd255)     res = {s2_sign, 8'hFF, 23'd0};
    else                            res = {s2_sign, exp_n[7:0], frac};
  end

  always_ff @(posedge clk) begin
    y <= res;
  end

endmodule
