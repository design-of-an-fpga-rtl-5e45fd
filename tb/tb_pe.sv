// tb_pe: self-checking test of one processing element.
//
// The testbench plays the sequencer, driving the control word state by state
// for loads, floating-point operations, stores, sends and receives, and
// models the local memory behind port A (synchronous read). It checks the
// stored results, the out registers seen by the neighbours, the receive path
// from each in register, and that a masked PE (en = 0) writes nothing.
module tb_pe;
  import simd_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  pe_ctrl_t          ctrl;
  logic              en;
  logic [31:0]       n_in, e_in, w_in, s_in, n_out, e_out, w_out, s_out;
  logic              mem_en, mem_we;
  logic [MEM_AW-1:0] mem_addr;
  logic [31:0]       mem_wdata, mem_rdata;

  pe u_dut (.*);

  logic [31:0] mem [512];
  always_ff @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input pe_ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
  endtask

  task automatic load(input int addr, input int r);
    pe_ctrl_t c;
    c = '0; c.mem_addr = MEM_AW'(addr); c.rd = REG_AW'(r);
    c.mem_en = 1; cyc(c);                      // ex1
    c.mem_en = 0; c.rdreg_we = 1; cyc(c);      // ex2
    c.rdreg_we = 0; c.dst_sel = DST_RDREG; cyc(c);  // lm1
    c.rf_we = 1; cyc(c);                       // wb1
    c.rf_we = 0; cyc(c);                       // wb2
  endtask

  task automatic fop(input fpu_op_t op, input int s1, input int s2, input int d, input int lat);
    pe_ctrl_t c;
    c = '0; c.fpu_op = op; c.rs1 = REG_AW'(s1); c.rs2 = REG_AW'(s2); c.rd = REG_AW'(d);
    c.ab_we = 1; cyc(c);
    c.ab_we = 0; c.s_we = 1; cyc(c);
    c.s_we = 0; repeat (lat) cyc(c);
    c.c_we = 1; cyc(c);
    c.c_we = 0; c.dst_sel = DST_C; c.rf_we = 1; cyc(c);
    c.rf_we = 0; cyc(c);
  endtask

  task automatic store(input int r, input int addr);
    pe_ctrl_t c;
    c = '0; c.fpu_op = FOP_PASS; c.rs1 = REG_AW'(r); c.mem_addr = MEM_AW'(addr);
    c.ab_we = 1; cyc(c);
    c.ab_we = 0; c.s_we = 1; cyc(c);
    c.s_we = 0; c.c_we = 1; cyc(c);
    c.c_we = 0; c.dst_sel = DST_C; c.wr_we = 1; cyc(c);
    c.wr_we = 0; c.mem_en = 1; c.mem_we = 1; cyc(c);
    c.mem_en = 0; c.mem_we = 0; cyc(c); cyc(c);
  endtask

  task automatic send(input dir_t d, input int r);
    pe_ctrl_t c;
    c = '0; c.fpu_op = FOP_PASS; c.rs1 = REG_AW'(r); c.dir = d;
    c.ab_we = 1; cyc(c);
    c.ab_we = 0; c.s_we = 1; cyc(c);
    c.s_we = 0; c.c_we = 1; cyc(c);
    c.c_we = 0; c.dst_sel = DST_C; c.out_we = 1; cyc(c);
    c.out_we = 0; cyc(c);
  endtask

  task automatic recv(input dir_t d, input int r);
    pe_ctrl_t c;
    c = '0; c.dir = d; c.rd = REG_AW'(r);
    c.cin_we = 1; cyc(c);
    c.cin_we = 0; c.dst_sel = DST_CIN; c.rf_we = 1; cyc(c);
    c.rf_we = 0; cyc(c);
  endtask

  initial begin
    ctrl = '0; en = 1'b1;
    n_in = int2fp(11); e_in = int2fp(22); w_in = int2fp(33); s_in = int2fp(44);
    mem[0] = int2fp(6); mem[1] = int2fp(4); mem[2] = int2fp(3);
    for (int i = 3; i < 512; i++) mem[i] = 32'h0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(n_out == 0 && e_out == 0 && w_out == 0 && s_out == 0, "out registers reset");

    load(0, 1); load(1, 2); load(2, 3);
    fop(FOP_MUL, 1, 2, 4, 3);     // 24
    fop(FOP_ADD, 4, 3, 5, 3);     // 27
    fop(FOP_SUB, 4, 3, 6, 3);     // 21
    fop(FOP_DIV, 4, 3, 7, 28);    // 8
    store(4, 10); store(5, 11); store(6, 12); store(7, 13);
    check(mem[10] == int2fp(24), $sformatf("mul stored %h", mem[10]));
    check(mem[11] == int2fp(27), $sformatf("add stored %h", mem[11]));
    check(mem[12] == int2fp(21), $sformatf("sub stored %h", mem[12]));
    check(mem[13] == int2fp(8),  $sformatf("div stored %h", mem[13]));

    send(DIR_N, 1); send(DIR_E, 2); send(DIR_W, 3); send(DIR_S, 5);
    check(n_out == int2fp(6),  "north out");
    check(e_out == int2fp(4),  "east out");
    check(w_out == int2fp(3),  "west out");
    check(s_out == int2fp(27), "south out");

    recv(DIR_N, 8); recv(DIR_E, 9); recv(DIR_W, 10); recv(DIR_S, 11);
    store(8, 20); store(9, 21); store(10, 22); store(11, 23);
    check(mem[20] == int2fp(11), "received from north");
    check(mem[21] == int2fp(22), "received from east");
    check(mem[22] == int2fp(33), "received from west");
    check(mem[23] == int2fp(44), "received from south");

    // masked: nothing visible may change
    en = 1'b0;
    fop(FOP_ADD, 1, 1, 4, 3);
    send(DIR_N, 2);
    begin
      pe_ctrl_t c;
      c = '0; c.fpu_op = FOP_PASS; c.rs1 = 4'd3; c.mem_addr = 9'd10;
      c.ab_we = 1; cyc(c); c.ab_we = 0; c.s_we = 1; cyc(c);
      c.s_we = 0; c.c_we = 1; cyc(c); c.c_we = 0; c.wr_we = 1; cyc(c);
      c.wr_we = 0; c.mem_en = 1; c.mem_we = 1; cyc(c); c = '0; cyc(c);
    end
    en = 1'b1;
    check(mem[10] == int2fp(24), "masked PE does not write memory");
    check(n_out == int2fp(6), "masked PE does not write out register");
    store(4, 30);
    check(mem[30] == int2fp(24), "masked PE does not write register file");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
