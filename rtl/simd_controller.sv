// simd_controller: sequencer of the SIMD machine.
//
// Holds the program counter (PC) and instruction register (IR), fetches each
// instruction from the instruction memory, decodes it, and steps through a
// state machine whose control word is broadcast, hard-wired, to every PE.
// The state names (rs, if1, if2, id1, ex1-ex3, fpu1-fpu3, div1-div26, lm1,
// sm1-sm4, wb1, wb2, zombie) are those of the published sequencer; the order
// in which they are visited is this design's, chosen to give the published
// cycle counts of 8 for a load, 10 for a store and 11 for an add, sub or mul:
//   load       if1 if2 id1 ex1 ex2 lm1 wb1 wb2                   (8)
//   store      if1 if2 id1 ex1 ex2 ex3 sm1 sm2 sm3 sm4           (10)
//   add/sub/mul if1 if2 id1 ex1 ex2 fpu1 fpu2 fpu3 ex3 wb1 wb2   (11)
//   div        if1 if2 id1 ex1 ex2 div1..div26 fpu2 fpu3 ex3 wb1 wb2 (36)
//   send       if1 if2 id1 ex1 ex2 ex3 wb1 wb2                   (8)
//   receive    if1 if2 id1 ex1 wb1 wb2                           (6)
// What each state does to the PEs: if1 presents the PC to the instruction
// memory, if2 loads IR and increments PC, id1 decodes; ex1 reads the register
// file into A/B (or starts a local-memory read, or latches a mesh in register
// into Cin); ex2 moves A/B to S1/S2 (or loads the memory read register);
// fpu*/div* wait for the FPU pipeline; ex3 latches the FPU result into C;
// lm1 puts the read register on the destination bus; wb1 writes the
// destination bus into the register file (or an out register); sm1 loads the
// write register and sm2 writes local memory, sm3/sm4 complete the store.
//
// After reset the sequencer waits in rs. A start pulse clears the PC and
// begins fetching at address 0 (the host loads the memories first). An
// opcode 000000 word, or any undefined opcode, ends the program in zombie,
// which also waits for start. The mask field disables PE k when bit k is 1.
module simd_controller
  import simd_pkg::*;
#(
  parameter int unsigned IMEM_AW = 9,
  parameter int unsigned NPE     = 9
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  output logic [IMEM_AW-1:0] imem_addr,
  input  logic [31:0]        imem_rdata,
  output pe_ctrl_t           ctrl,
  output logic [NPE-1:0]     pe_en,
  output logic               busy,
  output logic               halted,
  output ctrl_state_t        state
);

  typedef enum logic [2:0] {
    C_LOAD, C_STORE, C_FP, C_DIV, C_SEND, C_RECV, C_HALT
  } iclass_t;

  logic [IMEM_AW-1:0] pc;
  logic [31:0]        ir;
  ctrl_state_t        state_n;
  iclass_t            icls;
  fpu_op_t            iop;
  dir_t               idir;

  // ---------------- decode (IR is stable from id1 to the end) ----------------
  logic [5:0] opcode;
  assign opcode = ir[31:26];

  always_comb begin
    icls = C_HALT;
    iop  = FOP_PASS;
    idir = DIR_N;
    unique case (opcode)
      OP_LOAD:  icls = C_LOAD;
      OP_STORE: icls = C_STORE;
      OP_ADD:   begin icls = C_FP;  iop = FOP_ADD; end
      OP_SUB:   begin icls = C_FP;  iop = FOP_SUB; end
      OP_MUL:   begin icls = C_FP;  iop = FOP_MUL; end
      OP_DIV:   begin icls = C_DIV; iop = FOP_DIV; end
      OP_NR:    begin icls = C_RECV; idir = DIR_N; end
      OP_ER:    begin icls = C_RECV; idir = DIR_E; end
      OP_WR:    begin icls = C_RECV; idir = DIR_W; end
      OP_SR:    begin icls = C_RECV; idir = DIR_S; end
      OP_NS:    begin icls = C_SEND; idir = DIR_N; end
      OP_ES:    begin icls = C_SEND; idir = DIR_E; end
      OP_WS:    begin icls = C_SEND; idir = DIR_W; end
      OP_SS:    begin icls = C_SEND; idir = DIR_S; end
      default:  icls = C_HALT;
    endcase
  end

  // ---------------- next state ----------------
  always_comb begin
    state_n = state;
    unique case (state)
      S_RS, S_ZOMBIE: if (start) state_n = S_IF1;
      S_IF1: state_n = S_IF2;
      S_IF2: state_n = S_ID1;
      S_ID1: state_n = (icls == C_HALT) ? S_ZOMBIE : S_EX1;
      S_EX1: state_n = (icls == C_RECV) ? S_WB1 : S_EX2;
      S_EX2: begin
        unique case (icls)
          C_LOAD:  state_n = S_LM1;
          C_FP:    state_n = S_FPU1;
          C_DIV:   state_n = S_DIV1;
          default: state_n = S_EX3;
        endcase
      end
      S_FPU1: state_n = S_FPU2;
      S_FPU2: state_n = S_FPU3;
      S_FPU3: state_n = S_EX3;
      S_DIV26: state_n = S_FPU2;
      S_EX3: state_n = (icls == C_STORE) ? S_SM1 : S_WB1;
      S_LM1: state_n = S_WB1;
      S_WB1: state_n = S_WB2;
      S_WB2: state_n = S_IF1;
      S_SM1: state_n = S_SM2;
      S_SM2: state_n = S_SM3;
      S_SM3: state_n = S_SM4;
      S_SM4: state_n = S_IF1;
      default: begin
        // div1 .. div25 advance to the next divider wait state
        if (state >= S_DIV1 && state < S_DIV26) state_n = ctrl_state_t'(state + 6'd1);
        else                                    state_n = S_ZOMBIE;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RS;
      pc    <= '0;
      ir    <= '0;
    end else begin
      state <= state_n;
      if ((state == S_RS || state == S_ZOMBIE) && start) pc <= '0;
      if (state == S_IF2) begin
        ir <= imem_rdata;
        pc <= pc + 1'b1;
      end
    end
  end

  assign imem_addr = pc;
  assign busy      = (state != S_RS) && (state != S_ZOMBIE);
  assign halted    = (state == S_ZOMBIE);

  // ---------------- control word ----------------
  always_comb begin
    ctrl          = '0;
    ctrl.rs1      = (icls == C_STORE) ? ir[14:11] : ir[24:21];
    ctrl.rs2      = ir[19:16];
    ctrl.rd       = ir[14:11];
    ctrl.fpu_op   = (icls == C_FP || icls == C_DIV) ? iop : FOP_PASS;
    ctrl.dir      = idir;
    ctrl.mem_addr = ir[16 +: MEM_AW];
    ctrl.dst_sel  = DST_C;
    unique case (state)
      S_EX1: begin
        ctrl.ab_we  = (icls == C_STORE) || (icls == C_FP) || (icls == C_DIV) || (icls == C_SEND);
        ctrl.mem_en = (icls == C_LOAD);
        ctrl.cin_we = (icls == C_RECV);
      end
      S_EX2: begin
        ctrl.s_we     = (icls != C_LOAD);
        ctrl.rdreg_we = (icls == C_LOAD);
      end
      S_EX3: ctrl.c_we = 1'b1;
      S_LM1: ctrl.dst_sel = DST_RDREG;
      S_WB1: begin
        unique case (icls)
          C_LOAD:  ctrl.dst_sel = DST_RDREG;
          C_RECV:  ctrl.dst_sel = DST_CIN;
          default: ctrl.dst_sel = DST_C;
        endcase
        ctrl.rf_we  = (icls != C_SEND);
        ctrl.out_we = (icls == C_SEND);
      end
      S_SM1: ctrl.wr_we = 1'b1;
      S_SM2: begin
        ctrl.mem_en = 1'b1;
        ctrl.mem_we = 1'b1;
      end
      default: ;
    endcase
  end

  // Mask: bit k set disables PE k; PEs beyond the mask width are always on.
  always_comb begin
    for (int k = 0; k < int'(NPE); k++) begin
      pe_en[k] = (k < int'(MASK_BITS)) ? ~ir[k % MASK_BITS] : 1'b1;
    end
  end

  // A register-file or memory write happens only in a write-back or store state.
  a_write_states: assert property (@(posedge clk) disable iff (rst)
      (ctrl.rf_we || ctrl.out_we) |-> (state == S_WB1));
  a_store_states: assert property (@(posedge clk) disable iff (rst)
      ctrl.mem_we |-> (state == S_SM2));

endmodule
