// tb_fp_addsub: self-checking test of the three-stage adder/subtractor.
//
// Runs an adder (SUB = 0) and a subtractor (SUB = 1) side by side. Operands
// are fed every cycle; each result must appear exactly three cycles later.
// Directed cases with small integers must be exact (they appear in the
// matrix-multiplication program); random cases are compared with a real
// reference within the truncation tolerance.
module tb_fp_addsub;
  import fp_ref_pkg::*;

  localparam int LAT = 3;
  localparam int N   = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y_add, y_sub;
  fp_addsub #(.SUB(1'b0)) u_add (.clk, .a, .b, .y(y_add));
  fp_addsub #(.SUB(1'b1)) u_sub (.clk, .a, .b, .y(y_sub));

  int checks = 0, failures = 0;
  logic [31:0] va [N], vb [N];
  bit          exact [N];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: integers, cancellation, zero, mixed signs
    va[0] = int2fp(3);   vb[0] = int2fp(14);
    va[1] = int2fp(17);  vb[1] = int2fp(3);
    va[2] = int2fp(5);   vb[2] = int2fp(5);
    va[3] = int2fp(-7);  vb[3] = int2fp(2);
    va[4] = int2fp(0);   vb[4] = int2fp(9);
    va[5] = int2fp(1000); vb[5] = int2fp(-1);
    va[6] = int2fp(8388607); vb[6] = int2fp(1);
    va[7] = int2fp(1);   vb[7] = int2fp(0);
    for (int i = 0; i < 8; i++) exact[i] = 1'b1;
    for (int i = 8; i < N; i++) begin
      va[i] = rand_fp(110, 140);
      vb[i] = (i % 4 == 0) ? (va[i] ^ 32'h8000_0001) : rand_fp(110, 140);
      exact[i] = 1'b0;
    end
    a = 0; b = 0;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin a = va[i]; b = vb[i]; end
      @(posedge clk);
      #1;
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        int k;
        real ra, rb;
        k  = i - (LAT - 1);
        ra = fp2real(va[k]);
        rb = fp2real(vb[k]);
        checks += 2;
        if (exact[k]) begin
          if (y_add !== int2fp(int'(ra + rb))) begin
            failures++;
            $display("add %h + %h = %h, expected %h", va[k], vb[k], y_add, int2fp(int'(ra + rb)));
          end
          if (y_sub !== int2fp(int'(ra - rb))) begin
            failures++;
            $display("sub %h - %h = %h, expected %h", va[k], vb[k], y_sub, int2fp(int'(ra - rb)));
          end
        end else begin
          if (!close(y_add, ra + rb)) begin
            failures++;
            $display("add %h + %h = %h (%g), expected %g", va[k], vb[k], y_add, fp2real(y_add), ra + rb);
          end
          if (!close(y_sub, ra - rb)) begin
            failures++;
            $display("sub %h - %h = %h (%g), expected %g", va[k], vb[k], y_sub, fp2real(y_sub), ra - rb);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
