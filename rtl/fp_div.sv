// fp_div: 28-stage pipelined IEEE-754 single-precision divider.
//
// y = a / b, 28 clock edges after a and b are presented; a new division may
// start every cycle. The division loop is unrolled, one quotient bit per
// pipeline stage:
//   Stage 1:      split both operands into sign, exponent and mantissa.
//   Stage 2:      sign = XOR of the signs, exponent = difference plus bias; if
//                 the dividend mantissa is below the divisor mantissa it is
//                 doubled and the exponent lowered by one, so the quotient
//                 lies in [1, 2).
//   Stages 3-26:  24 radix-2 non-restoring steps. A non-negative partial
//                 remainder has the divisor subtracted (digit +1), a negative
//                 one has it added (digit -1); the remainder is then doubled.
//   Stage 27:     the digit string P (+1 digits as ones) becomes the quotient
//                 2P - (2^24 - 1), less one if the last remainder is negative.
//   Stage 28:     pack the result.
// The 28-stage depth and the 24 unrolled iteration stages follow the
// published divider, which is described as SRT non-restoring; the digit set
// {-1, +1} without a zero digit is this design's simplification. The result
// is truncated; a zero or denormal dividend gives zero, a zero divisor gives
// infinity, exponent overflow infinity and underflow zero.
module fp_div (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  localparam int unsigned ITER = 24;

  typedef struct packed {
    logic              sign;
    logic              zero;    // result is zero
    logic              inf;     // result is infinity
    logic signed [9:0] exp;
    logic signed [26:0] r;      // partial remainder
    logic [23:0]       d;       // divisor mantissa
    logic [23:0]       p;       // +1 digits so far
  } div_st_t;

  // stage 1: unpack
  logic        s1_sa, s1_sb, s1_za, s1_zb;
  logic [7:0]  s1_ea, s1_eb;
  logic [23:0] s1_ma, s1_mb;

  always_ff @(posedge clk) begin
    s1_sa <= a[31];
    s1_sb <= b[31];
    s1_ea <= a[30:23];
    s1_eb <= b[30:23];
    s1_ma <= {1'b1, a[22:0]};
    s1_mb <= {1'b1, b[22:0]};
    s1_za <= (a[30:23] == 8'd0);
    s1_zb <= (b[30:23] == 8'd0);
  end

  // stage 2: exponent and pre-normalisation
  div_st_t st [ITER+1];

  always_ff @(posedge clk) begin
    st[0].sign <= s1_sa ^ s1_sb;
    st[0].zero <= s1_za;
    st[0].inf  <= s1_zb & ~s1_za;
    st[0].d    <= s1_mb;
    st[0].p    <= 24'd0;
    if (s1_ma < s1_mb) begin
      st[0].r   <= $signed({2'b00, s1_ma, 1'b0});
      st[0].exp <= $signed({2'b00, s1_ea}) - $signed({2'b00, s1_eb}) + 10'sd126;
    end else begin
      st[0].r   <= $signed({3'b000, s1_ma});
      st[0].exp <= $signed({2'b00, s1_ea}) - $signed({2'b00, s1_eb}) + 10'sd127;
    end
  end

  // stages 3-26: one non-restoring step each
  for (genvar i = 1; i <= ITER; i++) begin : g_iter
    logic signed [26:0] r_next;
    logic               digit;
    always_comb begin
      digit = ~st[i-1].r[26];
      if (digit) r_next = st[i-1].r - $signed({3'b000, st[i-1].d});
      else       r_next = st[i-1].r + $signed({3'b000, st[i-1].d});
    end
    always_ff @(posedge clk) begin
      st[i]      <= st[i-1];
      st[i].r    <= r_next <<< 1;
      st[i].p    <= {st[i-1].p[22:0], digit};
    end
  end

  // stage 27: digit conversion and correction
  logic              s27_sign, s27_zero, s27_inf;
  logic signed [9:0] s27_exp;
  logic [24:0]       s27_q;
  logic [24:0]       q_conv;

  always_comb begin
    q_conv = {st[ITER].p, 1'b0} - 25'h0FF_FFFF;
    if (st[ITER].r[26]) q_conv = q_conv - 25'd1;
  end

  always_ff @(posedge clk) begin
    s27_sign <= st[ITER].sign;
    s27_zero <= st[ITER].zero;
    s27_inf  <= st[ITER].inf;
    s27_exp  <= st[ITER].exp;
    s27_q    <= q_conv;
  end

  // stage 28: pack
  always_ff @(posedge clk) begin
    if (s27_inf || s27_exp >= 10'sd255)       y <= {s27_sign, 8'hFF, 23'd0};
    else if (s27_zero || s27_exp <= 10'sd0)   y <= {s27_sign, 31'd0};
    else                                      y <= {s27_sign, s27_exp[7:0], s27_q[22:0]};
  end

endmodule
