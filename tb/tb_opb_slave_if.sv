// tb_opb_slave_if: self-checking test of the OPB slave glue.
//
// Two glue instances with adjacent 2 KB windows, each in front of a small
// memory model, sit on one OR-combined bus. The testbench, as the OPB
// master, writes and reads words in both windows and checks: exactly one
// memory access per transfer, the acknowledge one cycle after selection,
// read data only in the acknowledge cycle (zero otherwise), that the other
// window stays silent, and that an address outside both windows is not
// acknowledged.
module tb_opb_slave_if;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        opb_select = 0, opb_rnw = 0;
  logic [31:0] opb_abus = '0, opb_dbus = '0;
  logic [31:0] dbus [2];
  logic        ack  [2];
  logic        mem_en [2], mem_we [2];
  logic [8:0]  mem_addr [2];
  logic [31:0] mem_wdata [2], mem_rdata [2];
  logic [31:0] mem [2][512];
  int          n_access [2];

  for (genvar s = 0; s < 2; s++) begin : g_s
    opb_slave_if #(.BASE(32'h4000_1000 + 32'h800 * s), .AW(9)) u_dut (
      .clk, .rst, .opb_select, .opb_rnw, .opb_abus, .opb_dbus,
      .sl_dbus(dbus[s]), .sl_xferack(ack[s]),
      .mem_en(mem_en[s]), .mem_we(mem_we[s]), .mem_addr(mem_addr[s]),
      .mem_wdata(mem_wdata[s]), .mem_rdata(mem_rdata[s])
    );
    always @(posedge clk) if (mem_en[s]) begin
      if (mem_we[s]) mem[s][mem_addr[s]] <= mem_wdata[s];
      mem_rdata[s] <= mem[s][mem_addr[s]];
      n_access[s]  <= n_access[s] + 1;
    end
  end

  wire [31:0] sl_dbus    = dbus[0] | dbus[1];
  wire        sl_xferack = ack[0] | ack[1];

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

  // The master holds select for up to 4 cycles waiting for the acknowledge;
  // wait_cycles counts the cycles from selection to acknowledge, inclusive.
  task automatic xfer(input logic rnw, input logic [31:0] addr, input logic [31:0] wdata,
                      output logic [31:0] rdata, output int wait_cycles, output bit acked);
    @(posedge clk); #1;
    opb_select = 1; opb_rnw = rnw; opb_abus = addr; opb_dbus = wdata;
    acked = 0; wait_cycles = 0; rdata = '0;
    for (int i = 0; i < 4 && !acked; i++) begin
      @(negedge clk);
      wait_cycles++;
      check(sl_dbus == 0 || sl_xferack, "read data only with the acknowledge");
      if (sl_xferack) begin acked = 1; rdata = sl_dbus; end
    end
    @(posedge clk); #1;
    opb_select = 0; opb_abus = '0; opb_dbus = '0;
  endtask

  initial begin
    logic [31:0] rd, vals [2][16];
    int w, before0, before1;
    bit a;
    n_access[0] = 0; n_access[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++) begin
        vals[s][i] = $urandom | 32'h1;
        before0 = n_access[s];
        xfer(1'b0, 32'h4000_1000 + 32'h800 * s + 32'(4 * i * 17), vals[s][i], rd, w, a);
        check(a && w == 2, $sformatf("write acknowledged after %0d cycles", w));
        check(n_access[s] == before0 + 1, "exactly one memory access per write");
        check(mem[s][9'(i * 17)] == vals[s][i], $sformatf("slave %0d word %0d written", s, i * 17));
      end
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++) begin
        before0 = n_access[0]; before1 = n_access[1];
        xfer(1'b1, 32'h4000_1000 + 32'h800 * s + 32'(4 * i * 17), '0, rd, w, a);
        check(a && w == 2 && rd == vals[s][i], $sformatf("slave %0d read %h", s, rd));
        check((n_access[0] - before0) + (n_access[1] - before1) == 1, "only the addressed slave answers");
      end
    xfer(1'b1, 32'h4000_2000, '0, rd, w, a);
    check(!a, "address outside both windows is not acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
