// global_mem: dual-ported global memory shared by the on-chip host processor
// and the PC.
//
// WORDS x 32-bit RAM with two ports in separate clock domains. Port A runs
// on the system clock and is reached from the OPB through an opb_slave_if;
// the on-chip host processor stores results there. The LAD side runs on
// lad_clk: a plain synchronous word port that answers LAD word addresses
// LAD_BASE .. LAD_BASE + WORDS - 1 (0x200 .. 0x3FF by default, the block-RAM
// window of the published host program) and returns read data one lad_clk
// after the request; lad_dout is zero for addresses outside the window.
// The memory and its two buses follow the published design; the LAD signal
// set is this design's simplification of the board's Local Address Data bus.
module global_mem #(
  parameter int unsigned WORDS    = 512,
  parameter int unsigned AW       = $clog2(WORDS),
  parameter logic [15:0] LAD_BASE = 16'h0200
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          lad_clk,
  input  logic          lad_cs,
  input  logic [15:0]   lad_addr,
  output logic [31:0]   lad_dout
);

  logic [31:0] mem [WORDS];
  logic [15:0] lad_off;
  logic        lad_hit, lad_hit_q;
  logic [31:0] lad_q;

  assign lad_off = lad_addr - LAD_BASE;
  assign lad_hit = lad_cs && (lad_addr >= LAD_BASE) && (lad_off < 16'(WORDS));

  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
  end

  always_ff @(posedge lad_clk) begin
    if (lad_hit) lad_q <= mem[lad_off[AW-1:0]];
    lad_hit_q <= lad_hit;
  end

  assign lad_dout = lad_hit_q ? lad_q : 32'd0;

endmodule
