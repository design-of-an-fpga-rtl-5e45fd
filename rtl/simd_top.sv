// simd_top: the SIMD machine as an on-chip peripheral of a host processor.
//
// A host processor on the On-chip Peripheral Bus (OPB) loads a program into
// the instruction memory and data into the local memory of each processing
// element (PE), starts the sequencer, waits for it to finish, reads the
// results back from the PEs' memories and stores them in the global memory,
// from which a PC reads them over the board's Local Address Data (LAD) bus.
//
// Contents: instruction memory, sequencer (simd_controller), a ROWS x COLS
// torus mesh of PEs with 2 KB local memories (pe_array), one OPB glue block
// (opb_slave_if) per memory and one for the control/status register, and the
// global memory with its LAD port. All OPB slaves' read data and acknowledges
// are ORed onto sl_dbus / sl_xferack.
//
// OPB byte address map (this design's choice):
//   BASE + 0x0000 .. 0x07FF   instruction memory (up to 512 words)
//   BASE + 0x0800             control/status register
//                               write: bit 0 = 1 starts the program at word 0
//                               read:  bit 0 busy, bit 1 halted,
//                                      bits 13:8 sequencer state, bits 31:16 PC
//   BASE + 0x1000 + k*0x0800  local memory of PE k (512 words)
//   GM_BASE                   global memory (GM_WORDS words)
// The LAD side of the global memory answers word addresses 0x200 onward and
// is read-only; it runs on lad_clk. Timing: an OPB transfer is acknowledged
// one clock after it is selected; a LAD read returns one lad_clk later.
module simd_top
  import simd_pkg::*;
#(
  parameter int unsigned ROWS       = 3,
  parameter int unsigned COLS       = 3,
  parameter int unsigned MEM_WORDS  = 512,
  parameter int unsigned IMEM_WORDS = 512,
  parameter int unsigned GM_WORDS   = 512,
  parameter logic [31:0] BASE       = 32'h4000_0000,
  parameter logic [31:0] GM_BASE    = 32'h0008_0000
) (
  input  logic        clk,
  input  logic        rst,
  // OPB slave port
  input  logic        opb_select,
  input  logic        opb_rnw,
  input  logic [31:0] opb_abus,
  input  logic [31:0] opb_dbus,
  output logic [31:0] sl_dbus,
  output logic        sl_xferack,
  // LAD bus read port of the global memory
  input  logic        lad_clk,
  input  logic        lad_cs,
  input  logic [15:0] lad_addr,
  output logic [31:0] lad_dout,
  // status
  output logic        busy,
  output logic        halted,
  output logic [5:0]  ctrl_state
);

  localparam int unsigned N        = ROWS * COLS;
  localparam int unsigned IMEM_AW  = $clog2(IMEM_WORDS);
  localparam int unsigned GM_AW    = $clog2(GM_WORDS);
  localparam int unsigned NSLV     = N + 3;

  logic [31:0] slv_dbus [NSLV];
  logic        slv_ack  [NSLV];

  // ---------------- instruction memory ----------------
  logic               im_en, im_we;
  logic [IMEM_AW-1:0] im_addr, pc;
  logic [31:0]        im_wdata, im_rdata, instr;

  opb_slave_if #(.BASE(BASE), .AW(IMEM_AW)) u_opb_imem (
    .clk, .rst, .opb_select, .opb_rnw, .opb_abus, .opb_dbus,
    .sl_dbus(slv_dbus[0]), .sl_xferack(slv_ack[0]),
    .mem_en(im_en), .mem_we(im_we), .mem_addr(im_addr), .mem_wdata(im_wdata),
    .mem_rdata(im_rdata)
  );

  instr_mem #(.WORDS(IMEM_WORDS), .AW(IMEM_AW)) u_imem (
    .clk,
    .a_en(im_en), .a_we(im_we), .a_addr(im_addr), .a_wdata(im_wdata), .a_rdata(im_rdata),
    .b_addr(pc), .b_rdata(instr)
  );

  // ---------------- control / status register ----------------
  logic        cr_en, cr_we, cr_addr;
  logic [31:0] cr_wdata, cr_rdata;
  logic        start;
  ctrl_state_t state;

  opb_slave_if #(.BASE(BASE + 32'h0800), .AW(1)) u_opb_ctrl (
    .clk, .rst, .opb_select, .opb_rnw, .opb_abus, .opb_dbus,
    .sl_dbus(slv_dbus[1]), .sl_xferack(slv_ack[1]),
    .mem_en(cr_en), .mem_we(cr_we), .mem_addr(cr_addr), .mem_wdata(cr_wdata),
    .mem_rdata(cr_rdata)
  );

  assign start = cr_en && cr_we && cr_wdata[0];

  always_ff @(posedge clk) begin
    if (rst) cr_rdata <= '0;
    else if (cr_en) cr_rdata <= {16'(pc), 2'b00, 6'(state), 6'b0, halted, busy};
  end

  // ---------------- sequencer ----------------
  pe_ctrl_t     ctrl;
  logic [N-1:0] pe_en;

  simd_controller #(.IMEM_AW(IMEM_AW), .NPE(N)) u_ctrl (
    .clk, .rst, .start,
    .imem_addr(pc), .imem_rdata(instr),
    .ctrl, .pe_en, .busy, .halted, .state
  );

  assign ctrl_state = 6'(state);

  // ---------------- processing array ----------------
  logic              pm_en    [N];
  logic              pm_we    [N];
  logic [MEM_AW-1:0] pm_addr  [N];
  logic [31:0]       pm_wdata [N];
  logic [31:0]       pm_rdata [N];

  for (genvar k = 0; k < N; k++) begin : g_pe_opb
    opb_slave_if #(.BASE(BASE + 32'h1000 + 32'h0800 * k), .AW(MEM_AW)) u_opb_pe (
      .clk, .rst, .opb_select, .opb_rnw, .opb_abus, .opb_dbus,
      .sl_dbus(slv_dbus[3 + k]), .sl_xferack(slv_ack[3 + k]),
      .mem_en(pm_en[k]), .mem_we(pm_we[k]), .mem_addr(pm_addr[k]),
      .mem_wdata(pm_wdata[k]), .mem_rdata(pm_rdata[k])
    );
  end

  pe_array #(.ROWS(ROWS), .COLS(COLS), .MEM_WORDS(MEM_WORDS)) u_array (
    .clk, .rst, .ctrl, .pe_en,
    .host_en(pm_en), .host_we(pm_we), .host_addr(pm_addr),
    .host_wdata(pm_wdata), .host_rdata(pm_rdata)
  );

  // ---------------- global memory ----------------
  logic             gm_en, gm_we;
  logic [GM_AW-1:0] gm_addr;
  logic [31:0]      gm_wdata, gm_rdata;

  opb_slave_if #(.BASE(GM_BASE), .AW(GM_AW)) u_opb_gm (
    .clk, .rst, .opb_select, .opb_rnw, .opb_abus, .opb_dbus,
    .sl_dbus(slv_dbus[2]), .sl_xferack(slv_ack[2]),
    .mem_en(gm_en), .mem_we(gm_we), .mem_addr(gm_addr), .mem_wdata(gm_wdata),
    .mem_rdata(gm_rdata)
  );

  global_mem #(.WORDS(GM_WORDS), .AW(GM_AW)) u_gmem (
    .clk, .a_en(gm_en), .a_we(gm_we), .a_addr(gm_addr), .a_wdata(gm_wdata), .a_rdata(gm_rdata),
    .lad_clk, .lad_cs, .lad_addr, .lad_dout
  );

  // ---------------- OPB read-data / acknowledge OR ----------------
  always_comb begin
    sl_dbus    = '0;
    sl_xferack = 1'b0;
    for (int i = 0; i < int'(NSLV); i++) begin
      sl_dbus    = sl_dbus | slv_dbus[i];
      sl_xferack = sl_xferack | slv_ack[i];
    end
  end

endmodule
