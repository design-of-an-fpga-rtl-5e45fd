// tb_coproc_matmul: 3 x 3 matrix multiplication on the single-PE
// configuration of the machine (the floating-point co-processor).
//
// The machine is built with one PE (ROWS = COLS = 1). Its local memory holds
// A row by row in words 1-9 and B column by column in words 10-18; the
// 90-instruction program (36 loads, 45 floating-point operations, 9 stores)
// computes the nine dot products one after another and stores C row by row
// in words 19-27. The testbench checks all nine results against an integer
// reference and the run time against 36 x 8 + 9 x 10 + 45 x 11 = 873 cycles
// (plus 3 for the end-of-program word), and compares that with the 113 cycles
// the nine-PE machine needs for the same product (speed-up 873 / 113).
module tb_coproc_matmul;
  import simd_pkg::*;
  import fp_ref_pkg::*;
  import opb_host_pkg::*;

  localparam logic [31:0] BASE = 32'h4000_0000;

  logic clk = 1'b0, lad_clk = 1'b0, rst = 1'b1;
  always #15 clk = ~clk;
  always #4  lad_clk = ~lad_clk;

  logic        opb_select = 1'b0, opb_rnw = 1'b0;
  logic [31:0] opb_abus = '0, opb_dbus = '0, sl_dbus;
  logic        sl_xferack;
  logic        lad_cs = 1'b0;
  logic [15:0] lad_addr = '0;
  logic [31:0] lad_dout;
  logic        busy, halted;
  logic [5:0]  ctrl_state;

  simd_top #(.ROWS(1), .COLS(1)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic opb_xfer(input logic rnw, input logic [31:0] addr, input logic [31:0] wdata,
                          output logic [31:0] rdata);
    @(posedge clk); #1;
    opb_select = 1'b1; opb_rnw = rnw; opb_abus = addr; opb_dbus = wdata;
    forever begin
      @(negedge clk);
      if (sl_xferack) break;
    end
    rdata = sl_dbus;
    @(posedge clk); #1;
    opb_select = 1'b0; opb_rnw = 1'b0;
  endtask

  int busy_cycles = 0;
  always @(posedge clk) if (busy) busy_cycles++;

  initial begin
    int A [3][3] = '{'{3, 2, 1}, '{4, 5, 6}, '{2, 1, 3}};
    int B [3][3] = '{'{1, 2, 4}, '{7, 8, 9}, '{3, 5, 6}};
    logic [31:0] prog [$], rd;
    int c;

    repeat (4) @(posedge clk);
    #1 rst = 1'b0;

    // data: A row-major at 1..9, B column-major at 10..18
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        opb_xfer(1'b0, BASE + 32'h1000 + 32'(4 * (1 + 3 * i + j)), int2fp(A[i][j]), rd);
        opb_xfer(1'b0, BASE + 32'h1000 + 32'(4 * (10 + 3 * j + i)), int2fp(B[i][j]), rd);
      end

    // program: for each row, load the row, then for each column load the
    // column, three products, two sums, one store
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        if (j == 0) for (int t = 0; t < 3; t++) prog.push_back(im(OP_LOAD, 1 + 3 * i + t, t));
        for (int t = 0; t < 3; t++) prog.push_back(im(OP_LOAD, 10 + 3 * j + t, 3 + t));
        for (int t = 0; t < 3; t++) prog.push_back(rr(OP_MUL, t, 3 + t, 6 + t));
        prog.push_back(rr(OP_ADD, 6, 7, 9));
        prog.push_back(rr(OP_ADD, 9, 8, 10));
        prog.push_back(im(OP_STORE, 19 + 3 * i + j, 10));
      end
    end
    prog.push_back(32'h0);
    // the first loads of the published listing
    check(prog.size() == 91, $sformatf("program length %0d", prog.size()));
    check(prog[0] == 32'h18010000 && prog[3] == 32'h180a1800 && prog[11] == 32'h1c135000,
          "program words match the published encoding");
    for (int i = 0; i < prog.size(); i++) opb_xfer(1'b0, BASE + 32'(4 * i), prog[i], rd);

    busy_cycles = 0;
    opb_xfer(1'b0, BASE + 32'h0800, 32'h1, rd);
    do opb_xfer(1'b1, BASE + 32'h0800, '0, rd); while (!rd[1]);
    check(busy_cycles == 873 + 3, $sformatf("co-processor run took %0d cycles, expected 876", busy_cycles));
    $display("single-PE run: %0d cycles (873 for the 90 instructions); nine-PE run: 113; speed-up %0.3f",
             busy_cycles, 873.0 / 113.0);

    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        c = 0;
        for (int t = 0; t < 3; t++) c += A[i][t] * B[t][j];
        opb_xfer(1'b1, BASE + 32'h1000 + 32'(4 * (19 + 3 * i + j)), '0, rd);
        check(rd == int2fp(c), $sformatf("C[%0d][%0d] = %h, expected %0d", i, j, rd, c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
