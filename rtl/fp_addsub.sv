// fp_addsub: three-stage pipelined IEEE-754 single-precision adder/subtractor.
//
// y = a + b (SUB = 0) or y = a - b (SUB = 1), three clock edges after a and b
// are presented; a new operation may start every cycle.
//   Stage 1: split both operands into sign, exponent and mantissa with the
//            hidden '1' restored.
//   Stage 2: compare the operands, take the larger exponent, shift the smaller
//            mantissa right by the exponent difference (alignment).
//   Stage 3: add or subtract the aligned mantissas, normalise the sum, adjust
//            the exponent and pack the result.
// The three stages follow the published adder. This design's own choices:
// the aligned mantissas carry guard, round and sticky bits and the result is
// truncated (round toward zero); denormal inputs count as zero; an exponent
// overflow gives infinity and an underflow gives zero; NaN and infinity
// inputs get no special treatment. One module serves as adder and as
// subtractor through the SUB parameter.
module fp_addsub #(
  parameter bit SUB = 1'b0
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  // ---------------- stage 1: unpack ----------------
  logic        s1_sx, s1_sy;
  logic [7:0]  s1_ex, s1_ey;
  logic [23:0] s1_mx, s1_my;

  always_ff @(posedge clk) begin
    s1_sx <= a[31];
    s1_sy <= b[31] ^ SUB;
    s1_ex <= a[30:23];
    s1_ey <= b[30:23];
    s1_mx <= (a[30:23] == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    s1_my <= (b[30:23] == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
  end

  // ---------------- stage 2: compare and align ----------------
  logic        x_big;
  logic [7:0]  e_big, e_small;
  logic [23:0] m_big, m_small;
  logic [7:0]  shift;
  logic [26:0] small_ext, small_al;
  logic        sticky;

  always_comb begin
    x_big   = (s1_ex > s1_ey) || ((s1_ex == s1_ey) && (s1_mx >= s1_my));
    e_big   = x_big ? s1_ex : s1_ey;
    e_small = x_big ? s1_ey : s1_ex;
    m_big   = x_big ? s1_mx : s1_my;
    m_small = x_big ? s1_my : s1_mx;
    shift   = e_big - e_small;
    small_ext = {m_small, 3'b000};
    sticky    = 1'b0;
    if (shift >= 8'd27) begin
      small_al = {26'd0, |m_small};
    end else begin
      small_al = small_ext >> shift;
      for (int i = 0; i < 27; i++) begin
        if (i < int'(shift)) sticky = sticky | small_ext[i];
      end
      small_al[0] = small_al[0] | sticky;
    end
  end

  logic        s2_sign, s2_sub;
  logic [7:0]  s2_exp;
  logic [26:0] s2_mbig, s2_msmall;

  always_ff @(posedge clk) begin
    s2_sign   <= x_big ? s1_sx : s1_sy;
    s2_sub    <= s1_sx ^ s1_sy;
    s2_exp    <= e_big;
    s2_mbig   <= {m_big, 3'b000};
    s2_msmall <= small_al;
  end

  // ---------------- stage 3: add/subtract, normalise, pack ----------------
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic [26:0] norm;
  logic signed [9:0] exp_n;
  logic [31:0] res;

  always_comb begin
    sum   = s2_sub ? ({1'b0, s2_mbig} - {1'b0, s2_msmall})
                   : ({1'b0, s2_mbig} + {1'b0, s2_msmall});
    lz    = 5'd0;
    found = 1'b0;
    for (int i = 26; i >= 0; i--) begin
      if (!found && sum[i]) begin
        found = 1'b1;
        lz    = 5'(26 - i);
      end
    end
    if (sum[27]) begin
      norm  = sum[27:1];
      exp_n = $signed({2'b00, s2_exp}) + 10'sd1;
    end else begin
      norm  = sum[26:0] << lz;
      exp_n = $signed({2'b00, s2_exp}) - $signed({5'd0, lz});
    end
    if (sum == 28'd0 || s2_exp == 8'd0) begin
      res = 32'd0;
    end else if (exp_n >= 10'sd255) begin
      res = {s2_sign, 8'hFF, 23'd0};
    end else if (exp_n <= 10'sd0) begin
      res = {s2_sign, 31'd0};
    end else begin
      res = {s2_sign, exp_n[7:0], norm[25:3]};
    end
  end

  always_ff @(posedge clk) begin
    y <= res;
  end

endmodule
