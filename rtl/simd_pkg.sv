// simd_pkg: types and constants shared by the SIMD machine.
//
// Holds the instruction encoding (32-bit words, two formats), the opcode
// values, the operation codes of the floating-point unit, the sequencer state
// names and the control word that the sequencer broadcasts to every
// processing element (PE).
//
// Instruction formats (bit 31 on the left):
//   register-register: opcode[31:26] src1[25:21] src2[20:16] dst[15:11] mask[10:0]
//   immediate:         opcode[31:26] addr[25:16]            reg[15:11] mask[10:0]
// Field widths and the opcodes of load, store, add and mul follow the
// published machine code; the remaining opcodes are this design's choice.
package simd_pkg;

  localparam int unsigned INSTR_W   = 32;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned MASK_BITS = 11;
  localparam int unsigned REG_AW    = 4;   // 16 registers per PE
  localparam int unsigned MEM_AW    = 9;   // 512 words = 2 KB per PE

  // Opcodes (6 bits)
  localparam logic [5:0] OP_HALT  = 6'b000000;  // empty word: end of program
  localparam logic [5:0] OP_ADD   = 6'b000010;
  localparam logic [5:0] OP_SUB   = 6'b000011;
  localparam logic [5:0] OP_LOAD  = 6'b000110;
  localparam logic [5:0] OP_STORE = 6'b000111;
  localparam logic [5:0] OP_NR    = 6'b001000;  // receive from north
  localparam logic [5:0] OP_ER    = 6'b001001;  // receive from east
  localparam logic [5:0] OP_WR    = 6'b001010;  // receive from west
  localparam logic [5:0] OP_SR    = 6'b001011;  // receive from south
  localparam logic [5:0] OP_NS    = 6'b001100;  // send north
  localparam logic [5:0] OP_ES    = 6'b001101;  // send east
  localparam logic [5:0] OP_WS    = 6'b001110;  // send west
  localparam logic [5:0] OP_SS    = 6'b001111;  // send south
  localparam logic [5:0] OP_MUL   = 6'b100010;
  localparam logic [5:0] OP_DIV   = 6'b100011;

  typedef enum logic [2:0] {
    FOP_PASS = 3'd0,
    FOP_ADD  = 3'd1,
    FOP_SUB  = 3'd2,
    FOP_MUL  = 3'd3,
    FOP_DIV  = 3'd4
  } fpu_op_t;

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_W = 2'd2,
    DIR_S = 2'd3
  } dir_t;

  // Source of the PE destination bus
  typedef enum logic [1:0] {
    DST_C     = 2'd0,   // FPU result latch
    DST_RDREG = 2'd1,   // memory read register
    DST_CIN   = 2'd2    // latch fed by the mesh in registers
  } dst_sel_t;

  // Sequencer states, named as in the controller's state diagram.
  typedef enum logic [5:0] {
    S_RS, S_IF1, S_IF2, S_ID1, S_EX1, S_EX2, S_EX3,
    S_FPU1, S_FPU2, S_FPU3,
    S_DIV1,  S_DIV2,  S_DIV3,  S_DIV4,  S_DIV5,  S_DIV6,  S_DIV7,
    S_DIV8,  S_DIV9,  S_DIV10, S_DIV11, S_DIV12, S_DIV13, S_DIV14,
    S_DIV15, S_DIV16, S_DIV17, S_DIV18, S_DIV19, S_DIV20, S_DIV21,
    S_DIV22, S_DIV23, S_DIV24, S_DIV25, S_DIV26,
    S_LM1, S_SM1, S_SM2, S_SM3, S_SM4, S_WB1, S_WB2, S_ZOMBIE
  } ctrl_state_t;

  // Control word broadcast by the sequencer to all PEs in one cycle.
  typedef struct packed {
    logic [REG_AW-1:0] rs1;      // register file read port 1 address
    logic [REG_AW-1:0] rs2;      // register file read port 2 address
    logic [REG_AW-1:0] rd;       // register file write address
    logic              ab_we;    // A <- RF[rs1], B <- RF[rs2]
    logic              s_we;     // S1 <- A, S2 <- B
    fpu_op_t           fpu_op;   // FPU operation (held for the instruction)
    logic              c_we;     // C <- FPU result
    dir_t              dir;      // mesh direction for send / receive
    logic              cin_we;   // Cin <- in register of direction dir
    dst_sel_t          dst_sel;  // destination bus source
    logic              rf_we;    // RF[rd] <- destination bus
    logic              wr_we;    // write register <- destination bus
    logic              out_we;   // out register of direction dir <- destination bus
    logic              rdreg_we; // read register <- local memory data
    logic              mem_en;   // local memory access
    logic              mem_we;   // local memory write (write register -> memory)
    logic [MEM_AW-1:0] mem_addr; // local memory address
  } pe_ctrl_t;

  // IEEE-754 single precision fields
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

endpackage
