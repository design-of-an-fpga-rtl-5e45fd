// tb_pe_array: self-checking test of the 3 x 3 torus processing array.
//
// The host ports load distinct values (k + 1 + 16 d for direction d) into
// each PE's local memory. Playing the sequencer, the testbench then has every
// PE load one, send it in one direction and receive from the opposite direction, for all
// four directions, and store what it received. Reading the local memories
// back over the host ports shows which neighbour each PE heard from, which
// must match the torus wiring (wrap-around at every edge). A store with one
// PE masked checks the per-PE enables.
module tb_pe_array;
  import simd_pkg::*;
  import fp_ref_pkg::*;

  localparam int R = 3, C = 3, N = R * C;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  pe_ctrl_t          ctrl;
  logic [N-1:0]      pe_en;
  logic              host_en    [N];
  logic              host_we    [N];
  logic [MEM_AW-1:0] host_addr  [N];
  logic [31:0]       host_wdata [N];
  logic [31:0]       host_rdata [N];

  pe_array #(.ROWS(R), .COLS(C), .MEM_WORDS(512)) u_dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input pe_ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
  endtask

  task automatic host_write(input int k, input int a, input logic [31:0] d);
    host_en[k] = 1; host_we[k] = 1; host_addr[k] = MEM_AW'(a); host_wdata[k] = d;
    @(posedge clk); #1;
    host_en[k] = 0; host_we[k] = 0;
  endtask

  task automatic host_read(input int k, input int a, output logic [31:0] d);
    host_en[k] = 1; host_we[k] = 0; host_addr[k] = MEM_AW'(a);
    @(posedge clk); #1;
    host_en[k] = 0;
    d = host_rdata[k];
  endtask

  task automatic load(input int addr, input int r);
    pe_ctrl_t c;
    c = '0; c.mem_addr = MEM_AW'(addr); c.rd = REG_AW'(r);
    c.mem_en = 1; cyc(c);
    c.mem_en = 0; c.rdreg_we = 1; cyc(c);
    c.rdreg_we = 0; c.dst_sel = DST_RDREG; c.rf_we = 1; cyc(c);
    c = '0; cyc(c);
  endtask

  task automatic store(input int r, input int addr);
    pe_ctrl_t c;
    c = '0; c.fpu_op = FOP_PASS; c.rs1 = REG_AW'(r); c.mem_addr = MEM_AW'(addr);
    c.ab_we = 1; cyc(c);
    c.ab_we = 0; c.s_we = 1; cyc(c);
    c.s_we = 0; c.c_we = 1; cyc(c);
    c.c_we = 0; c.wr_we = 1; cyc(c);
    c.wr_we = 0; c.mem_en = 1; c.mem_we = 1; cyc(c);
    c = '0; cyc(c);
  endtask

  task automatic send(input dir_t d, input int r);
    pe_ctrl_t c;
    c = '0; c.fpu_op = FOP_PASS; c.rs1 = REG_AW'(r); c.dir = d;
    c.ab_we = 1; cyc(c);
    c.ab_we = 0; c.s_we = 1; cyc(c);
    c.s_we = 0; c.c_we = 1; cyc(c);
    c.c_we = 0; c.out_we = 1; cyc(c);
    c = '0; cyc(c);
  endtask

  task automatic recv(input dir_t d, input int r);
    pe_ctrl_t c;
    c = '0; c.dir = d; c.rd = REG_AW'(r);
    c.cin_we = 1; cyc(c);
    c.cin_we = 0; c.dst_sel = DST_CIN; c.rf_we = 1; cyc(c);
    c = '0; cyc(c);
  endtask

  function automatic int nb(input int k, input int dr, input int dc);
    return ((k / C + dr + R) % R) * C + (k % C + dc + C) % C;
  endfunction

  initial begin
    logic [31:0] rd;
    dir_t send_dir [4] = '{DIR_N, DIR_E, DIR_W, DIR_S};
    dir_t recv_dir [4] = '{DIR_S, DIR_W, DIR_E, DIR_N};
    int   src_dr   [4] = '{1, 0, 0, -1};   // the PE heard from: south, west, east, north
    int   src_dc   [4] = '{0, -1, 1, 0};

    ctrl = '0; pe_en = '1;
    for (int k = 0; k < N; k++) begin
      host_en[k] = 0; host_we[k] = 0; host_addr[k] = '0; host_wdata[k] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < N; k++) begin
      host_write(k, 0, int2fp(k + 1));
      for (int d = 0; d < 4; d++) host_write(k, 10 + d, int2fp(k + 1 + 16 * d));
    end
    for (int d = 0; d < 4; d++) begin
      load(10 + d, 1);
      send(send_dir[d], 1);
      recv(recv_dir[d], 2);
      store(2, 1 + d);
    end
    for (int k = 0; k < N; k++)
      for (int d = 0; d < 4; d++) begin
        int src;
        src = nb(k, src_dr[d], src_dc[d]);
        host_read(k, 1 + d, rd);
        check(rd == int2fp(src + 1 + 16 * d),
              $sformatf("PE%0d direction %0d heard %h, expected PE%0d", k, d, rd, src));
      end

    // masked store: PE3 disabled
    load(0, 1);
    for (int k = 0; k < N; k++) host_write(k, 9, 32'hDEAD_BEEF);
    pe_en = ~(9'd1 << 3);
    store(1, 9);
    pe_en = '1;
    for (int k = 0; k < N; k++) begin
      host_read(k, 9, rd);
      check(rd == ((k == 3) ? 32'hDEAD_BEEF : int2fp(k + 1)), $sformatf("masked store PE%0d: %h", k, rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
