// tb_fpu: self-checking test of the floating-point unit wrapper.
//
// For each operation the operands are held (as the PE's S1/S2 latches hold
// them) and the output is checked exactly at the operation's latency: 3
// cycles for add, sub and mul, 28 for div, and at once for pass. One cycle
// earlier the output must not yet show the result (operands change from a
// different pair, so a stale value is recognisable). A second part streams
// a new random operand pair into every unit each cycle and checks each
// output, one latency later, against a real-number reference: the FPU's
// units are fully pipelined even though the sequencer uses one at a time.
module tb_fpu;
  import simd_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fpu_op_t     op;
  logic [31:0] s1, s2, y;

  fpu u_dut (.clk, .op, .s1, .s2, .y);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fpu_op_t o, input int a, input int b, input int lat, input logic [31:0] expv);
    // flush the pipelines with a different operand pair
    op = o; s1 = int2fp(1); s2 = int2fp(1);
    repeat (30) @(posedge clk);
    #1 s1 = int2fp(a); s2 = int2fp(b);
    if (lat == 0) begin
      #1 check(y == expv, $sformatf("op %0d: pass gives %h", o, y));
      return;
    end
    repeat (lat - 1) @(posedge clk);
    #1 check(y != expv, $sformatf("op %0d: result already there after %0d cycles", o, lat - 1));
    @(posedge clk);
    #1 check(y == expv, $sformatf("op %0d: %h after %0d cycles, expected %h", o, y, lat, expv));
  endtask

  task automatic stream(input fpu_op_t o, input int lat);
    localparam int N = 40;
    logic [31:0] qa[N], qb[N];
    real r;
    op = o;
    for (int i = 0; i < N; i++) begin
      qa[i] = rand_fp(110, 140);
      qb[i] = rand_fp(110, 140);
    end
    for (int t = 0; t < N + lat; t++) begin
      if (t < N) begin s1 = qa[t]; s2 = qb[t]; end
      @(posedge clk);
      #1;
      if (t + 1 >= lat && t + 1 - lat < N) begin
        int k = t + 1 - lat;
        unique case (o)
          FOP_ADD: r = fp2real(qa[k]) + fp2real(qb[k]);
          FOP_SUB: r = fp2real(qa[k]) - fp2real(qb[k]);
          FOP_MUL: r = fp2real(qa[k]) * fp2real(qb[k]);
          default: r = fp2real(qa[k]) / fp2real(qb[k]);
        endcase
        check(close(y, r), $sformatf("op %0d stream %0d: %h gives %g, expected %g",
                                     o, k, y, fp2real(y), r));
      end
    end
  endtask

  initial begin
    run(FOP_ADD, 20, 37, 3, int2fp(57));
    run(FOP_SUB, 20, 37, 3, int2fp(-17));
    run(FOP_MUL, 6, 9, 3, int2fp(54));
    run(FOP_DIV, 54, 9, 28, int2fp(6));
    run(FOP_PASS, 77, 5, 0, int2fp(77));
    stream(FOP_ADD, 3);
    stream(FOP_SUB, 3);
    stream(FOP_MUL, 3);
    stream(FOP_DIV, 28);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
