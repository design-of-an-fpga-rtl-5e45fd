// tb_simd_controller: self-checking test of the sequencer on its own.
//
// A small instruction memory model in the testbench (synchronous read, like
// the real one) holds one instruction of every class. The testbench records
// the state sequence of each instruction and compares it with the expected
// sequence, which fixes the cycle counts (load 8, store 10, add/sub/mul 11,
// div 36, send 8, receive 6). It also checks the control word in the key
// states (register addresses, memory address, write enables, destination
// select, FPU operation, direction), the per-PE enables of a masked
// instruction, the end-of-program state and a restart from it.
module tb_simd_controller;
  import simd_pkg::*;
  import opb_host_pkg::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  always #5 clk = ~clk;

  logic [8:0]  imem_addr;
  logic [31:0] imem_rdata;
  pe_ctrl_t    ctrl;
  logic [8:0]  pe_en;
  logic        busy, halted;
  ctrl_state_t state;

  simd_controller #(.IMEM_AW(9), .NPE(9)) u_dut (.*);

  logic [31:0] imem [16];
  always_ff @(posedge clk) imem_rdata <= imem[imem_addr[3:0]];

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

  // expected state sequences
  ctrl_state_t q_load[$]  = '{S_IF1, S_IF2, S_ID1, S_EX1, S_EX2, S_LM1, S_WB1, S_WB2};
  ctrl_state_t q_store[$] = '{S_IF1, S_IF2, S_ID1, S_EX1, S_EX2, S_EX3, S_SM1, S_SM2, S_SM3, S_SM4};
  ctrl_state_t q_fp[$]    = '{S_IF1, S_IF2, S_ID1, S_EX1, S_EX2, S_FPU1, S_FPU2, S_FPU3, S_EX3, S_WB1, S_WB2};
  ctrl_state_t q_send[$]  = '{S_IF1, S_IF2, S_ID1, S_EX1, S_EX2, S_EX3, S_WB1, S_WB2};
  ctrl_state_t q_recv[$]  = '{S_IF1, S_IF2, S_ID1, S_EX1, S_WB1, S_WB2};
  ctrl_state_t q_div[$];

  // Runs one instruction from if1 and compares the visited states.
  task automatic step(input ctrl_state_t expq[$], input string name);
    ctrl_state_t seen[$];
    seen = {};
    do begin
      seen.push_back(state);
      @(posedge clk); #1;
    end while (state != S_IF1 && state != S_ZOMBIE && seen.size() < 100);
    check(seen == expq, $sformatf("%s: %0d states, expected %0d", name, seen.size(), expq.size()));
  endtask

  // control word checks, sampled on every cycle
  always @(negedge clk) if (!rst) begin
    case (state)
      S_WB1: if (u_dut.opcode == OP_LOAD) begin
        check(ctrl.rf_we && ctrl.dst_sel == DST_RDREG && ctrl.rd == 4'd5, "load write-back control");
      end else if (u_dut.opcode == OP_MUL) begin
        check(ctrl.rf_we && ctrl.dst_sel == DST_C && ctrl.rd == 4'd9 && ctrl.fpu_op == FOP_MUL,
              "mul write-back control");
        check(pe_en == 9'b111101110, $sformatf("mask of the mul: pe_en %b", pe_en));
      end else if (u_dut.opcode == OP_WS) begin
        check(ctrl.out_we && !ctrl.rf_we && ctrl.dir == DIR_W, "send west write-back control");
      end else if (u_dut.opcode == OP_SR) begin
        check(ctrl.rf_we && ctrl.dst_sel == DST_CIN && ctrl.rd == 4'd12, "receive south write-back");
      end
      S_EX1: if (u_dut.opcode == OP_STORE) begin
        check(ctrl.ab_we && ctrl.rs1 == 4'd10, "store reads its register field");
      end else if (u_dut.opcode == OP_LOAD) begin
        check(ctrl.mem_en && !ctrl.mem_we && ctrl.mem_addr == 9'h1A3, "load memory read");
      end else if (u_dut.opcode == OP_DIV) begin
        check(ctrl.ab_we && ctrl.rs1 == 4'd7 && ctrl.rs2 == 4'd8, "div source registers");
      end else if (u_dut.opcode == OP_SR) begin
        check(ctrl.cin_we && ctrl.dir == DIR_S, "receive latches the south in register");
      end
      S_SM2: check(ctrl.mem_en && ctrl.mem_we && ctrl.mem_addr == 9'h007, "store memory write");
      S_EX3: check(ctrl.c_we, "ex3 latches C");
      S_EX2: if (u_dut.opcode == OP_LOAD) check(ctrl.rdreg_we, "load fills the read register");
             else check(ctrl.s_we, "ex2 loads S1/S2");
      default: ;
    endcase
    if (state == S_FPU2 && u_dut.opcode == OP_ADD) check(ctrl.fpu_op == FOP_ADD, "add FPU op");
    if (state == S_EX3 && u_dut.opcode == OP_STORE) check(ctrl.fpu_op == FOP_PASS, "store passes S1");
    if (state inside {S_EX1, S_EX2, S_EX3, S_WB1} && u_dut.opcode != OP_MUL)
      check(pe_en == '1, "unmasked instruction enables all PEs");
  end

  initial begin
    q_div = '{S_IF1, S_IF2, S_ID1, S_EX1, S_EX2};
    for (int i = 0; i < 26; i++) q_div.push_back(ctrl_state_t'(int'(S_DIV1) + i));
    q_div.push_back(S_FPU2); q_div.push_back(S_FPU3); q_div.push_back(S_EX3);
    q_div.push_back(S_WB1);  q_div.push_back(S_WB2);

    for (int i = 0; i < 16; i++) imem[i] = 32'h0;
    imem[0] = im(OP_LOAD, 10'h1A3, 5);
    imem[1] = im(OP_STORE, 7, 10);
    imem[2] = rr(OP_ADD, 1, 2, 3);
    imem[3] = rr(OP_MUL, 4, 5, 9, 11'b000_0001_0001);   // PE0 and PE4 masked
    imem[4] = rr(OP_DIV, 7, 8, 6);
    imem[5] = rr(OP_WS, 2, 0, 0);
    imem[6] = rr(OP_SR, 0, 0, 12);
    imem[7] = 32'h0;

    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(state == S_RS && !busy, "waits in rs after reset");
    start = 1'b1; @(posedge clk); #1 start = 1'b0;
    check(busy, "busy after start");
    step(q_load, "load");
    step(q_store, "store");
    step(q_fp, "add");
    step(q_fp, "mul");
    step(q_div, "div");
    step(q_send, "send");
    step(q_recv, "receive");
    step('{S_IF1, S_IF2, S_ID1}, "end word");
    check(state == S_ZOMBIE && halted && !busy, "program end in zombie");
    check(imem_addr == 9'd8, $sformatf("PC after 8 fetches: %0d", imem_addr));
    repeat (5) @(posedge clk);
    #1 check(state == S_ZOMBIE, "zombie holds");
    start = 1'b1; @(posedge clk); #1 start = 1'b0;
    check(state == S_IF1 && imem_addr == 9'd0, "restart fetches from address 0");
    step(q_load, "load after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
