// pe: processing element of the SIMD array, a datapath without a control
// unit.
//
// Every cycle the PE obeys the control word broadcast by the sequencer; the
// enable input (from the instruction's mask field) blocks all of its state
// changes that are visible to a program (register file, write register,
// out registers, local-memory writes) when the PE is masked off.
//
// Datapath, as in the published PE:
//   register file (16 x 32) -> A, B latches -> S1, S2 latches -> FPU -> C latch
//   destination bus = C, the read register (local-memory data) or Cin (mesh)
//   destination bus -> register file, write register (to local memory) or one
//   of the four out registers (N, E, W, S) that drive the neighbours.
// The four in registers sample the neighbours' out registers on every clock,
// so the mesh links are register based and full duplex; a receive
// instruction copies the chosen in register into Cin and then into the
// register file. The local memory itself sits outside the PE (pe_local_mem);
// the PE drives its port A from the control word and its write register.
// All latches reset to zero.
module pe
  import simd_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  pe_ctrl_t          ctrl,
  input  logic              en,
  // mesh: neighbours' out registers in, own out registers out
  input  logic [31:0]       n_in,
  input  logic [31:0]       e_in,
  input  logic [31:0]       w_in,
  input  logic [31:0]       s_in,
  output logic [31:0]       n_out,
  output logic [31:0]       e_out,
  output logic [31:0]       w_out,
  output logic [31:0]       s_out,
  // port A of the local memory
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata
);

  logic [31:0] rf [16];
  logic [31:0] a_q, b_q, s1_q, s2_q, c_q, cin_q, rdreg_q, wrreg_q;
  logic [31:0] in_q [4];
  logic [31:0] out_q [4];
  logic [31:0] fpu_y, dbus;

  fpu u_fpu (.clk, .op(ctrl.fpu_op), .s1(s1_q), .s2(s2_q), .y(fpu_y));

  always_comb begin
    unique case (ctrl.dst_sel)
      DST_RDREG: dbus = rdreg_q;
      DST_CIN:   dbus = cin_q;
      default:   dbus = c_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) rf[i] <= '0;
      for (int i = 0; i < 4; i++) begin
        in_q[i]  <= '0;
        out_q[i] <= '0;
      end
      a_q <= '0; b_q <= '0; s1_q <= '0; s2_q <= '0;
      c_q <= '0; cin_q <= '0; rdreg_q <= '0; wrreg_q <= '0;
    end else begin
      in_q[DIR_N] <= n_in;
      in_q[DIR_E] <= e_in;
      in_q[DIR_W] <= w_in;
      in_q[DIR_S] <= s_in;
      if (ctrl.ab_we) begin
        a_q <= rf[ctrl.rs1];
        b_q <= rf[ctrl.rs2];
      end
      if (ctrl.s_we) begin
        s1_q <= a_q;
        s2_q <= b_q;
      end
      if (ctrl.c_we)     c_q     <= fpu_y;
      if (ctrl.cin_we)   cin_q   <= in_q[ctrl.dir];
      if (ctrl.rdreg_we) rdreg_q <= mem_rdata;
      if (en) begin
        if (ctrl.rf_we)  rf[ctrl.rd]     <= dbus;
        if (ctrl.wr_we)  wrreg_q         <= dbus;
        if (ctrl.out_we) out_q[ctrl.dir] <= dbus;
      end
    end
  end

  assign n_out = out_q[DIR_N];
  assign e_out = out_q[DIR_E];
  assign w_out = out_q[DIR_W];
  assign s_out = out_q[DIR_S];

  assign mem_en    = ctrl.mem_en;
  assign mem_we    = ctrl.mem_we & en;
  assign mem_addr  = ctrl.mem_addr;
  assign mem_wdata = wrreg_q;

endmodule
