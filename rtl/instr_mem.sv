// instr_mem: dual-ported instruction memory of the SIMD machine.
//
// WORDS x 32-bit RAM. Port A is the host's: the host processor writes the
// SIMD program (and may read it back) through the OPB glue. Port B is
// read-only and belongs to the sequencer, which presents the program counter
// and receives the instruction word one clock later. The dual-ported
// arrangement follows the published machine; the depth (512 words, one
// 18 Kb block RAM) is this design's choice.
module instr_mem #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: host (OPB)
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: sequencer
  input  logic [AW-1:0] b_addr,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
