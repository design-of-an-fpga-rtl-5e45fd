// pe_array: the mesh-connected processing array.
//
// ROWS x COLS processing elements (3 x 3 by default, the published size),
// each with its own dual-ported local memory. PE k sits at row k / COLS and
// column k % COLS. Each PE's N, E, W and S out registers drive the facing in
// register of its neighbour (N out -> northern neighbour's S in, and so on);
// the links wrap around at the edges, so the array is a torus, as the
// published array diagram shows (PE0's north link goes to PE6, its west link
// to PE2). All PEs receive the same control word; pe_en[k] masks PE k.
// Port B of every local memory is brought out per PE for the host glue.
module pe_array
  import simd_pkg::*;
#(
  parameter int unsigned ROWS      = 3,
  parameter int unsigned COLS      = 3,
  parameter int unsigned MEM_WORDS = 512,
  localparam int unsigned N        = ROWS * COLS
) (
  input  logic              clk,
  input  logic              rst,
  input  pe_ctrl_t          ctrl,
  input  logic [N-1:0]      pe_en,
  // host side of the local memories, one port per PE
  input  logic              host_en    [N],
  input  logic              host_we    [N],
  input  logic [MEM_AW-1:0] host_addr  [N],
  input  logic [31:0]       host_wdata [N],
  output logic [31:0]       host_rdata [N]
);

  logic [31:0] n_out [N];
  logic [31:0] e_out [N];
  logic [31:0] w_out [N];
  logic [31:0] s_out [N];

  for (genvar k = 0; k < N; k++) begin : g_pe
    localparam int unsigned R  = k / COLS;
    localparam int unsigned C  = k % COLS;
    localparam int unsigned KN = ((R + ROWS - 1) % ROWS) * COLS + C;
    localparam int unsigned KS = ((R + 1) % ROWS) * COLS + C;
    localparam int unsigned KW = R * COLS + (C + COLS - 1) % COLS;
    localparam int unsigned KE = R * COLS + (C + 1) % COLS;

    logic              mem_en, mem_we;
    logic [MEM_AW-1:0] mem_addr;
    logic [31:0]       mem_wdata, mem_rdata;

    pe u_pe (
      .clk, .rst, .ctrl, .en(pe_en[k]),
      .n_in(s_out[KN]), .e_in(w_out[KE]), .w_in(e_out[KW]), .s_in(n_out[KS]),
      .n_out(n_out[k]), .e_out(e_out[k]), .w_out(w_out[k]), .s_out(s_out[k]),
      .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
    );

    pe_local_mem #(.WORDS(MEM_WORDS), .AW(MEM_AW)) u_mem (
      .clk,
      .a_en(mem_en), .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
      .b_en(host_en[k]), .b_we(host_we[k]), .b_addr(host_addr[k]),
      .b_wdata(host_wdata[k]), .b_rdata(host_rdata[k])
    );
  end

endmodule
