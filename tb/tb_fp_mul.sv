// tb_fp_mul: self-checking test of the pipelined fp_mul unit.
//
// Operands are fed every cycle; each result must appear exactly 3 cycles
// later (the unit's pipeline depth). Directed cases with small integers,
// taken from the matrix-multiplication data, must be exact; random cases are
// compared with a real reference within the truncation tolerance. Zero
// operands are checked too.
module tb_fp_mul;
  import fp_ref_pkg::*;

  localparam int LAT = 3;
  localparam int N   = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y;
  fp_mul u_dut (.clk, .a, .b, .y);

  int checks = 0, failures = 0;
  logic [31:0] va [N], vb [N], vexp [N];
  bit          exact [N];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    va[0] = int2fp(3);  vb[0] = int2fp(1);   vexp[0] = int2fp(3);
    va[1] = int2fp(2);  vb[1] = int2fp(7);   vexp[1] = int2fp(14);
    va[2] = int2fp(6);  vb[2] = int2fp(9);   vexp[2] = int2fp(54);
    va[3] = int2fp(-5); vb[3] = int2fp(8);   vexp[3] = int2fp(-40);
    va[4] = int2fp(0);  vb[4] = int2fp(9);   vexp[4] = 32'd0;
    va[5] = int2fp(4095); vb[5] = int2fp(4097); vexp[5] = 32'h4B7F_FFFF;
    va[6] = int2fp(-3); vb[6] = int2fp(-3);  vexp[6] = int2fp(9);
    va[7] = int2fp(1);  vb[7] = int2fp(1);   vexp[7] = int2fp(1);
    for (int i = 0; i < 8; i++) exact[i] = 1'b1;
    for (int i = 8; i < N; i++) begin
      va[i] = rand_fp(100, 150);
      vb[i] = rand_fp(100, 150);
      exact[i] = 1'b0;
    end
    a = 0; b = 0;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin a = va[i]; b = vb[i]; end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        int k;
        k = i - (LAT - 1);
        checks++;
        if (exact[k] ? (y !== vexp[k]) : !close(y, fp2real(va[k]) * fp2real(vb[k]))) begin
          failures++;
          $display("%h * %h = %h, expected %g", va[k], vb[k], y, fp2real(va[k]) * fp2real(vb[k]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
