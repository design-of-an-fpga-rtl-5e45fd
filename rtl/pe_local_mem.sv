// pe_local_mem: dual-ported local data memory of one processing element.
//
// WORDS x 32-bit RAM (512 words = 2 KB by default, the published size).
// Port A belongs to the PE: its address and enable come from the sequencer,
// write data from the PE's write register, read data goes to the PE's read
// register. Port B belongs to the host through the OPB glue. Both ports are
// synchronous: read data appears one clock after the enable. When both
// ports write the same word in one cycle, port A's value is kept (a choice of
// this design).
module pe_local_mem #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: processing element
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: host (OPB)
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
