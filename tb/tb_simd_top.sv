// tb_simd_top: end-to-end test of the SIMD machine at its default size
// (3 x 3 PEs, 2 KB local memories), driven through its OPB and LAD ports as
// the host processor and the PC would drive it.
//
// Program 1 is the published 3 x 3 matrix multiplication: each PE holds one
// row of A and one column of B, loads them (6 loads), forms three products
// and two sums (5 floating-point operations) and stores its element of
// C = A * B (1 store). The testbench checks the twelve machine-code words
// against their published hexadecimal values, the nine results against both
// an integer reference and the published result words, and the run time
// against the published 113 cycles (plus 3 for fetching and decoding the
// end-of-program word). It then plays the host: copies the results to the
// global memory over the OPB and reads them back over the LAD bus.
//
// Program 2 restarts the sequencer from its end state and exercises the rest
// of the instruction set: division, subtraction, sends and receives in all
// four directions across the torus wrap-around, and a masked instruction.
// The number of times each mechanism happened is counted; one that never
// happened counts as a failure.
module tb_simd_top;
  import simd_pkg::*;
  import fp_ref_pkg::*;
  import opb_host_pkg::*;

  localparam logic [31:0] BASE    = 32'h4000_0000;
  localparam logic [31:0] GM_BASE = 32'h0008_0000;
  localparam int          NPE     = 9;

  logic clk = 1'b0, lad_clk = 1'b0, rst = 1'b1;
  always #15 clk = ~clk;            // 33 MHz-like system clock
  always #4  lad_clk = ~lad_clk;    // faster LAD clock

  logic        opb_select = 1'b0, opb_rnw = 1'b0;
  logic [31:0] opb_abus = '0, opb_dbus = '0, sl_dbus;
  logic        sl_xferack;
  logic        lad_cs = 1'b0;
  logic [15:0] lad_addr = '0;
  logic [31:0] lad_dout;
  logic        busy, halted;
  logic [5:0]  ctrl_state;

  simd_top u_dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- OPB and LAD masters ----------------
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
    opb_select = 1'b0; opb_rnw = 1'b0; opb_abus = '0; opb_dbus = '0;
  endtask

  task automatic opb_write(input logic [31:0] addr, input logic [31:0] data);
    logic [31:0] dummy;
    opb_xfer(1'b0, addr, data, dummy);
  endtask

  task automatic opb_read(input logic [31:0] addr, output logic [31:0] data);
    opb_xfer(1'b1, addr, '0, data);
  endtask

  task automatic lad_read(input logic [15:0] addr, output logic [31:0] data);
    @(posedge lad_clk); #1;
    lad_cs = 1'b1; lad_addr = addr;
    @(posedge lad_clk); #1;
    lad_cs = 1'b0;
    data = lad_dout;
  endtask

  function automatic logic [31:0] pe_addr(input int k, input int word);
    return BASE + 32'h1000 + 32'h0800 * k + 32'(4 * word);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_load, n_store, n_fp3, n_div, n_send, n_recv, n_masked, n_restart, n_halt;
  int busy_cycles;
  ctrl_state_t st;
  assign st = ctrl_state_t'(ctrl_state);

  always @(posedge clk) if (!rst) begin
    if (st == S_LM1)  n_load++;
    if (st == S_SM1)  n_store++;
    if (st == S_FPU1) n_fp3++;
    if (st == S_DIV1) n_div++;
    if (u_dut.u_ctrl.ctrl.out_we) n_send++;
    if (u_dut.u_ctrl.ctrl.cin_we) n_recv++;
    if (u_dut.u_ctrl.ctrl.rf_we && u_dut.u_ctrl.pe_en != '1) n_masked++;
    if (st == S_ZOMBIE && u_dut.start) n_restart++;
    if (st == S_ID1 && u_dut.u_ctrl.opcode == OP_HALT) n_halt++;
    if (busy) busy_cycles++;
  end

  // ---------------- stimulus ----------------
  int A [3][3] = '{'{3, 2, 1}, '{4, 5, 6}, '{2, 1, 3}};
  int B [3][3] = '{'{1, 2, 4}, '{7, 8, 9}, '{3, 5, 6}};
  logic [31:0] published_c [9] = '{32'h41a00000, 32'h41d80000, 32'h42100000,
                                   32'h42640000, 32'h429c0000, 32'h42c20000,
                                   32'h41900000, 32'h41d80000, 32'h420c0000};
  logic [31:0] published_prog [12] = '{32'h18000000, 32'h18010800, 32'h18021000,
                                       32'h18031800, 32'h18042000, 32'h18052800,
                                       32'h88033000, 32'h88243800, 32'h88454000,
                                       32'h08c74800, 32'h09285000, 32'h1c075000};

  task automatic run_program(input logic [31:0] prog [], output int cycles);
    logic [31:0] rd;
    for (int i = 0; i < prog.size(); i++) opb_write(BASE + 32'(4 * i), prog[i]);
    opb_write(BASE + 32'(4 * prog.size()), 32'h0000_0000);   // end of program
    for (int i = 0; i < prog.size(); i++) begin
      opb_read(BASE + 32'(4 * i), rd);
      check(rd == prog[i], $sformatf("instruction memory word %0d reads back %h", i, rd));
    end
    busy_cycles = 0;
    opb_write(BASE + 32'h0800, 32'h1);
    do opb_read(BASE + 32'h0800, rd); while (!rd[1]);
    check(!rd[0] && rd[13:8] == 6'(S_ZOMBIE), $sformatf("status after run %h", rd));
    cycles = busy_cycles;
  endtask

  initial begin
    logic [31:0] rd, res [9];
    logic [31:0] prog1 [], prog2 [];
    int cyc, exp_cyc;
    int C [3][3];

    repeat (4) @(posedge clk);
    #1 rst = 1'b0;

    // ---- program 1: published matrix multiplication ----
    prog1 = new[12];
    for (int i = 0; i < 6; i++) prog1[i] = im(OP_LOAD, i, i);
    prog1[6]  = rr(OP_MUL, 0, 3, 6);
    prog1[7]  = rr(OP_MUL, 1, 4, 7);
    prog1[8]  = rr(OP_MUL, 2, 5, 8);
    prog1[9]  = rr(OP_ADD, 6, 7, 9);
    prog1[10] = rr(OP_ADD, 9, 8, 10);
    prog1[11] = im(OP_STORE, 7, 10);
    for (int i = 0; i < 12; i++)
      check(prog1[i] == published_prog[i], $sformatf("encoding of instruction %0d: %h", i + 1, prog1[i]));

    for (int k = 0; k < NPE; k++) begin
      for (int t = 0; t < 3; t++) begin
        opb_write(pe_addr(k, t),     int2fp(A[k / 3][t]));
        opb_write(pe_addr(k, 3 + t), int2fp(B[t][k % 3]));
      end
    end
    opb_read(pe_addr(4, 1), rd);
    check(rd == int2fp(5), "PE4 local memory readback over OPB");

    run_program(prog1, cyc);
    // 6 loads x 8 + 5 FP x 11 + 1 store x 10 = 113, plus 3 for the end word
    check(cyc == 113 + 3, $sformatf("matrix multiplication took %0d cycles, expected 116", cyc));

    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        C[i][j] = 0;
        for (int t = 0; t < 3; t++) C[i][j] += A[i][t] * B[t][j];
      end
    for (int k = 0; k < NPE; k++) begin
      opb_read(pe_addr(k, 7), res[k]);
      check(res[k] == int2fp(C[k / 3][k % 3]),
            $sformatf("PE%0d result %h, expected %0d", k, res[k], C[k / 3][k % 3]));
      check(res[k] == published_c[k], $sformatf("PE%0d result %h vs published %h", k, res[k], published_c[k]));
    end

    // host copies the results to the global memory; the PC reads them on LAD
    for (int k = 0; k < NPE; k++) opb_write(GM_BASE + 32'(4 * k), res[k]);
    for (int k = 0; k < NPE; k++) begin
      lad_read(16'h0200 + 16'(k), rd);
      check(rd == published_c[k], $sformatf("LAD read of result %0d: %h", k, rd));
    end
    opb_read(GM_BASE + 32'd8, rd);
    check(rd == published_c[2], "global memory OPB readback");

    // ---- program 2: div, sub, mesh routing, mask ----
    for (int k = 0; k < NPE; k++) begin
      opb_write(pe_addr(k, 8), int2fp(4 * (k + 1)));
      opb_write(pe_addr(k, 9), int2fp(2));
    end
    prog2 = new[17];
    prog2[0]  = im(OP_LOAD, 8, 3);
    prog2[1]  = im(OP_LOAD, 9, 4);
    prog2[2]  = rr(OP_DIV, 3, 4, 5);          // r5 = 2(k+1)
    prog2[3]  = rr(OP_SUB, 5, 4, 6);          // r6 = 2k
    prog2[4]  = rr(OP_NS, 6, 0, 0);           // north out = r6
    prog2[5]  = rr(OP_SR, 0, 0, 7);           // r7 = from south neighbour
    prog2[6]  = rr(OP_ES, 3, 0, 0);           // east out = r3
    prog2[7]  = rr(OP_WR, 0, 0, 8);           // r8 = from west neighbour
    prog2[8]  = rr(OP_WS, 5, 0, 0);           // west out = r5
    prog2[9]  = rr(OP_ER, 0, 0, 9);           // r9 = from east neighbour
    prog2[10] = rr(OP_SS, 6, 0, 0);           // south out = r6
    prog2[11] = rr(OP_NR, 0, 0, 10);          // r10 = from north neighbour
    prog2[12] = rr(OP_ADD, 7, 8, 11, 11'b000_0001_0000);  // PE4 masked off
    prog2[13] = im(OP_STORE, 10, 11);
    prog2[14] = im(OP_STORE, 11, 9);
    prog2[15] = im(OP_STORE, 12, 10);
    prog2[16] = im(OP_STORE, 13, 5);
    run_program(prog2, cyc);
    exp_cyc = 2 * 8 + 36 + 11 + 4 * 8 + 4 * 6 + 11 + 4 * 10 + 3;
    check(cyc == exp_cyc, $sformatf("program 2 took %0d cycles, expected %0d", cyc, exp_cyc));

    for (int k = 0; k < NPE; k++) begin
      int r, c, kn, ks, ke, kw, e10;
      r = k / 3; c = k % 3;
      kn = ((r + 2) % 3) * 3 + c;
      ks = ((r + 1) % 3) * 3 + c;
      kw = r * 3 + (c + 2) % 3;
      ke = r * 3 + (c + 1) % 3;
      e10 = (k == 4) ? 0 : 2 * ks + 4 * (kw + 1);
      opb_read(pe_addr(k, 10), rd);
      check(rd == int2fp(e10), $sformatf("PE%0d south+west sum %h, expected %0d", k, rd, e10));
      opb_read(pe_addr(k, 11), rd);
      check(rd == int2fp(2 * (ke + 1)), $sformatf("PE%0d from east %h", k, rd));
      opb_read(pe_addr(k, 12), rd);
      check(rd == int2fp(2 * kn), $sformatf("PE%0d from north %h", k, rd));
      opb_read(pe_addr(k, 13), rd);
      check(rd == int2fp(2 * (k + 1)), $sformatf("PE%0d quotient %h", k, rd));
    end

    // ---- every mechanism happened ----
    $display("mechanisms: load=%0d store=%0d add/sub/mul=%0d div=%0d send=%0d receive=%0d masked-writes=%0d restart=%0d end-of-program=%0d",
             n_load, n_store, n_fp3, n_div, n_send, n_recv, n_masked, n_restart, n_halt);
    check(n_load > 0,    "load never happened");
    check(n_store > 0,   "store never happened");
    check(n_fp3 > 0,     "add/sub/mul never happened");
    check(n_div > 0,     "division never happened");
    check(n_send == 4,   "sends in four directions");
    check(n_recv == 4,   "receives in four directions");
    check(n_masked > 0,  "masked instruction never happened");
    check(n_restart > 0, "restart from the end state never happened");
    check(n_halt == 2,   "end-of-program word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
