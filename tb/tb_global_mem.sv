// tb_global_mem: self-checking test of the global memory.
//
// The OPB-side port writes random words at the system clock; the LAD side
// reads them back on its own, faster and unrelated clock, through its
// address window (0x200 onward): one lad_clk of latency, zero for addresses
// outside the window. The OPB side's own read-back is checked as well.
module tb_global_mem;
  logic clk = 1'b0, lad_clk = 1'b0;
  always #15 clk = ~clk;
  always #4  lad_clk = ~lad_clk;

  logic        a_en = 0, a_we = 0;
  logic [8:0]  a_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata;
  logic        lad_cs = 0;
  logic [15:0] lad_addr = '0;
  logic [31:0] lad_dout;

  global_mem #(.WORDS(512), .LAD_BASE(16'h0200)) u_dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ref_m [512];

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

  task automatic lad_read(input logic [15:0] addr, output logic [31:0] d);
    @(posedge lad_clk); #1;
    lad_cs = 1; lad_addr = addr;
    @(posedge lad_clk); #1;
    lad_cs = 0;
    d = lad_dout;
  endtask

  initial begin
    logic [31:0] rd;
    @(posedge clk); #1;
    for (int i = 0; i < 512; i++) begin
      ref_m[i] = $urandom | 32'h1;
      a_en = 1; a_we = 1; a_addr = 9'(i); a_wdata = ref_m[i];
      @(posedge clk); #1;
    end
    a_en = 0; a_we = 0;
    for (int i = 0; i < 512; i += 3) begin
      lad_read(16'h0200 + 16'(i), rd);
      check(rd == ref_m[i], $sformatf("LAD word %0d: %h", i, rd));
    end
    lad_read(16'h01FF, rd);
    check(rd == 32'h0, "LAD below the window reads zero");
    lad_read(16'h0400, rd);
    check(rd == 32'h0, "LAD above the window reads zero");
    for (int i = 0; i < 512; i += 5) begin
      a_en = 1; a_addr = 9'(i);
      @(posedge clk); #1;
      check(a_rdata == ref_m[i], $sformatf("OPB-side word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
