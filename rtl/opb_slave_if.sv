// opb_slave_if: OPB slave glue for one memory-like peripheral.
//
// Decodes the peripheral's address window on the On-chip Peripheral Bus
// (OPB) and turns each bus transfer into exactly one access on a simple
// synchronous memory port, the role of the published OPB glue logic. A
// transfer is selected when OPB_select is high and the byte address lies in
// [BASE, BASE + 4 * 2^AW). In that cycle the glue issues mem_en (and mem_we
// for a write, with the bus write data); on the next cycle it raises
// Sl_xferAck for one cycle and, for a read, drives the memory's read data on
// Sl_DBus. Outside the acknowledge cycle Sl_DBus is zero, so the slaves'
// outputs can simply be ORed, as OPB's distributed multiplexer bus does. The
// master is expected to drop OPB_select (or start a new transfer) after the
// acknowledge; the one-cycle latency and the exact handshake are this
// design's choices. Words are 32 bits and addressed by ABus[AW+1:2].
module opb_slave_if #(
  parameter logic [31:0]  BASE = 32'h0000_0000,
  parameter int unsigned  AW   = 9
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          opb_select,
  input  logic          opb_rnw,
  input  logic [31:0]   opb_abus,
  input  logic [31:0]   opb_dbus,
  output logic [31:0]   sl_dbus,
  output logic          sl_xferack,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata
);

  localparam logic [31:0] WIN_MASK = ~((32'd1 << (AW + 2)) - 32'd1);

  logic hit, ack_q, rd_q;

  assign hit       = opb_select && ((opb_abus & WIN_MASK) == (BASE & WIN_MASK));
  assign mem_en    = hit && !ack_q;
  assign mem_we    = mem_en && !opb_rnw;
  assign mem_addr  = opb_abus[AW+1:2];
  assign mem_wdata = opb_dbus;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q <= 1'b0;
      rd_q  <= 1'b0;
    end else begin
      ack_q <= mem_en;
      rd_q  <= mem_en && opb_rnw;
    end
  end

  assign sl_xferack = ack_q;
  assign sl_dbus    = (ack_q && rd_q) ? mem_rdata : 32'd0;

  // The acknowledge answers a transfer that is still selected.
  a_ack_selected: assert property (@(posedge clk) disable iff (rst)
      sl_xferack |-> opb_select);

endmodule
